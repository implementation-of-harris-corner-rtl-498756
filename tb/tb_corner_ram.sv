// tb_corner_ram: writes random corner records and reads them back in a
// random order, checking the registered read and that a simultaneous write
// to the same address returns the old record.
module tb_corner_ram;
  import harris_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, we = 0, re = 0;
  logic [3:0] waddr = 0, raddr = 0;
  corner_t wdata = '0, rdata;
  corner_t model [DEPTH];
  int checks = 0, failures = 0;

  corner_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    corner_t e;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a);
      wdata.r = resp_t'({$urandom, $urandom}); wdata.x = 8'($urandom); wdata.y = 8'($urandom);
      model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      re = 1; raddr = 4'($urandom);
      we = $urandom_range(0, 1) == 1;
      waddr = ($urandom_range(0, 2) == 0) ? raddr : 4'($urandom);
      wdata.r = resp_t'({$urandom, $urandom}); wdata.x = 8'($urandom); wdata.y = 8'($urandom);
      e = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0; re = 0;
      checks++;
      if (rdata != e) begin failures++; $display("n=%0d got %h exp %h", n, rdata, e); end
      @(negedge clk);
      checks++;
      if (rdata != e) begin failures++; $display("rdata not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
