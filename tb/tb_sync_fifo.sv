// tb_sync_fifo: random pushes and pops against a queue model; fills the FIFO
// to full and drains it to empty, checking full, out_valid, count and order.
module tb_sync_fifo;
  localparam int DW = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic push = 0, out_ready = 0;
  logic [DW-1:0] in_data = 0, out_data;
  logic full, out_valid;
  logic [2:0] count;
  logic [DW-1:0] q [$];
  int checks = 0, failures = 0, nfull = 0;

  sync_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      // state checks before this cycle's operation
      checks++;
      if (full != (q.size() == DEPTH) || out_valid != (q.size() != 0) || int'(count) != q.size() ||
          (q.size() != 0 && out_data != q[0])) begin
        failures++;
        $display("n=%0d full=%0b valid=%0b count=%0d data=%h model size %0d", n, full, out_valid, count,
                 out_data, q.size());
      end
      if (full) nfull++;
      // phases: fill, drain, random
      if (n < 10)       begin push = !full; out_ready = 0; end
      else if (n < 20)  begin push = 0;     out_ready = $urandom_range(0, 1) == 1; end
      else              begin push = !full && $urandom_range(0, 1) == 1; out_ready = $urandom_range(0, 2) != 0; end
      in_data = DW'($urandom);
      if (out_valid && out_ready) void'(q.pop_front());
      if (push) q.push_back(in_data);
    end
    checks++;
    if (nfull == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
