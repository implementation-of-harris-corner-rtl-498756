// sync_fifo: single-clock FIFO for matched corner coordinates.
//
// DEPTH entries of DW bits in a RAM with read and write pointers one bit
// wider than the address, so full and empty are told apart by that top bit.
// Write side: push with full; a push while full is ignored. Read side is a
// valid/ready pair in first-word-fall-through style: out_data is the oldest
// entry whenever out_valid is high and advances on out_valid && out_ready.
// The source design names the two coordinate FIFOs only; depth, handshake
// and style are this design's choices.
module sync_fifo #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [DW-1:0] in_data,
  output logic          full,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data,
  output logic [AW:0]   count
);

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          do_push, do_pop;

  assign count     = wptr - rptr;
  assign full      = (count == (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign do_push   = push && !full;
  assign do_pop    = out_valid && out_ready;
  assign out_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  // A producer must not push into a full FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("sync_fifo: push while full");

endmodule
