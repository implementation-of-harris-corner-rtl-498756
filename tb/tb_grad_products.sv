// tb_grad_products: random and extreme gradients; checks the three products
// and the coordinates one clock after each input beat.
module tb_grad_products;
  import harris_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [COORD_W-1:0] in_x = 0, in_y = 0;
  logic signed [GRAD_W-1:0] in_ix = 0, in_iy = 0;
  logic out_valid;
  logic [COORD_W-1:0] out_x, out_y;
  logic signed [PROD_W-1:0] out_ixx, out_iyy, out_ixy;
  int checks = 0, failures = 0;

  grad_products dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      case (n)
        0: begin a = 1020;  b = -1020; end
        1: begin a = -1020; b = -1020; end
        2: begin a = -1;    b = 1020;  end
        default: begin a = int'($urandom_range(0, 2040)) - 1020; b = int'($urandom_range(0, 2040)) - 1020; end
      endcase
      @(negedge clk);
      in_valid = 1; in_ix = GRAD_W'(a); in_iy = GRAD_W'(b);
      in_x = COORD_W'(n); in_y = COORD_W'(n >> 3);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(out_ixx) != a*a || int'(out_iyy) != b*b || int'(out_ixy) != a*b ||
          out_x != COORD_W'(n) || out_y != COORD_W'(n >> 3)) begin
        failures++;
        $display("n=%0d a=%0d b=%0d got %0d %0d %0d", n, a, b, out_ixx, out_iyy, out_ixy);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
