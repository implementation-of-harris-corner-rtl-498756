// tb_line_buffer: random writes and reads against a reference array.
// Checks the registered read (data of the addressed word one clock after
// re), that rdata holds while re is low, and read-before-overwrite when both
// ports address the same word.
module tb_line_buffer;
  localparam int DW = 8, DEPTH = 16;
  logic clk = 0, we = 0, re = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [DW-1:0] wdata = 0, rdata;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  line_buffer #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp_q;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 4'(a); wdata = DW'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0; re = 1; raddr = 0; exp_q = model[0];
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      re = $urandom_range(0, 3) != 0;
      we = $urandom_range(0, 1) == 1;
      raddr = 4'($urandom); waddr = ($urandom_range(0, 3) == 0) ? raddr : 4'($urandom);
      wdata = DW'($urandom);
      if (re) exp_q = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        $display("mismatch n=%0d rdata=%h exp=%h", n, rdata, exp_q);
      end
      we = 0; re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
