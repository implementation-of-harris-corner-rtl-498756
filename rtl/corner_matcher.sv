// corner_matcher: matches the corners of the current frame with those of the
// last frame, using two corner memories and two coordinate FIFOs.
//
// Matching rule (source design): every pixel has its own response R and two
// different corners with the same R are rare enough to ignore, so a corner
// of the current frame and a corner of the last frame whose R values are
// equal are taken to be the same scene point. Block RAM 1 collects the
// corners of the frame now being processed, Block RAM 2 holds those of the
// last frame; on a match the current-frame coordinates go to FIFO 1 and the
// last-frame coordinates to FIFO 2. Block RAM 2 is cleared to zero after
// reset, and the contents of RAM 1 are copied into RAM 2 while the next
// image is being read in. Those points follow the source design.
//
// Sequencing (this design's choice, the source gives none):
//   CLEAR   after reset, zero every RAM 2 record (busy, input stalled)
//   COLLECT write each incoming corner to RAM 1 (dropped and counted once
//           MAX_CORNERS are stored); on frame_done freeze the count
//   MATCH   for each RAM 1 record i, scan RAM 2 records j in order and stop
//           at the first equal R; push both coordinate pairs, waiting while
//           either FIFO is full (busy: the caller stalls its pixel input)
//   COPY    copy RAM 1 records to RAM 2 (one per clock) while the new frame
//           already streams in and its corners start filling RAM 1 again
// The match of a frame takes at most n1 * (n2 + 3) clocks plus FIFO waits.
// The copy is safe because the first corner of a frame appears several
// image rows after the frame starts, later than the copy of MAX_CORNERS
// records ends; an assertion checks that.
module corner_matcher
  import harris_pkg::*;
#(
  parameter int unsigned MAX_CORNERS = 256,
  parameter int unsigned FIFO_DEPTH  = 256,
  localparam int unsigned AW  = (MAX_CORNERS > 1) ? $clog2(MAX_CORNERS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // detected corners
  input  logic          corner_valid,
  input  corner_t       corner,
  input  logic          frame_done,
  // control
  output logic          busy,        // clearing or matching: stall the input
  output logic          match_done,  // one-clock pulse: a frame's match ended
  // FIFO 1: matched corners, current-frame coordinates
  output logic          cur_valid,
  input  logic          cur_ready,
  output coord_t        cur_xy,
  // FIFO 2: matched corners, last-frame coordinates
  output logic          last_valid,
  input  logic          last_ready,
  output coord_t        last_xy,
  // status
  output logic [AW:0]   frame_corners,  // corners stored for the last frame
  output logic [AW:0]   frame_matches,  // matches found for the last frame
  output logic [15:0]   dropped         // corners lost to a full RAM 1
);

  typedef enum logic [2:0] {
    S_CLEAR, S_START, S_RD1, S_LAT, S_SCAN, S_PUSH, S_COPY, S_COLLECT
  } state_t;

  state_t state;

  // ---------------------------------------------------------------- RAMs
  logic          r1_we, r1_re, r2_we, r2_re;
  logic [AW-1:0] r1_waddr, r1_raddr, r2_waddr, r2_raddr;
  corner_t       r1_wdata, r1_rdata, r2_wdata, r2_rdata;

  corner_ram #(.DEPTH(MAX_CORNERS)) u_ram1 (
    .clk, .we(r1_we), .waddr(r1_waddr), .wdata(r1_wdata),
    .re(r1_re), .raddr(r1_raddr), .rdata(r1_rdata)
  );

  corner_ram #(.DEPTH(MAX_CORNERS)) u_ram2 (
    .clk, .we(r2_we), .waddr(r2_waddr), .wdata(r2_wdata),
    .re(r2_re), .raddr(r2_raddr), .rdata(r2_rdata)
  );

  // ---------------------------------------------------------------- FIFOs
  logic push, full1, full2;
  corner_t cur, prev;

  sync_fifo #(.DW($bits(coord_t)), .DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk, .rst_n, .push(push), .in_data({cur.x, cur.y}), .full(full1),
    .out_valid(cur_valid), .out_ready(cur_ready), .out_data(cur_xy),
    .count()
  );

  sync_fifo #(.DW($bits(coord_t)), .DEPTH(FIFO_DEPTH)) u_fifo2 (
    .clk, .rst_n, .push(push), .in_data({prev.x, prev.y}), .full(full2),
    .out_valid(last_valid), .out_ready(last_ready), .out_data(last_xy),
    .count()
  );

  // ---------------------------------------------------------------- collect
  logic [AW:0] n1;   // corners written to RAM 1 in the current frame
  logic        wr_ok;

  assign wr_ok    = corner_valid && (n1 < (AW+1)'(MAX_CORNERS));
  assign r1_we    = wr_ok;
  assign r1_waddr = n1[AW-1:0];
  assign r1_wdata = corner;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n1      <= '0;
      dropped <= '0;
    end else begin
      if (frame_done)  n1 <= '0;
      else if (wr_ok)  n1 <= n1 + 1'b1;
      if (corner_valid && !wr_ok && dropped != '1) dropped <= dropped + 1'b1;
    end
  end

  // ---------------------------------------------------------------- control
  logic [AW:0] nf;      // corners of the frame being matched / copied
  logic [AW:0] n2;      // valid records in RAM 2
  logic [AW:0] i, j, c; // RAM 1 index, RAM 2 index, clear/copy index
  logic [AW:0] nmatch;
  logic        cp_v;
  logic [AW-1:0] cp_addr;

  assign busy = (state != S_COLLECT) && (state != S_COPY);
  assign push = (state == S_PUSH) && !full1 && !full2;

  // RAM 1 read port: match reads record i, copy reads record c.
  assign r1_re    = (state == S_RD1) || (state == S_COPY && c < nf);
  assign r1_raddr = (state == S_COPY) ? c[AW-1:0] : i[AW-1:0];

  // RAM 2 read port: scan.
  assign r2_re    = (state == S_LAT) || (state == S_SCAN && j < n2);
  assign r2_raddr = (state == S_LAT) ? '0 : j[AW-1:0];

  // RAM 2 write port: zero on clear, copied record one clock after its read.
  assign r2_we    = (state == S_CLEAR) || cp_v;
  assign r2_waddr = (state == S_CLEAR) ? c[AW-1:0] : cp_addr;
  assign r2_wdata = (state == S_CLEAR) ? '0 : r1_rdata;

  logic last_i;
  assign last_i = (i + 1'b1 == nf);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_CLEAR;
      nf            <= '0;
      n2            <= '0;
      i             <= '0;
      j             <= '0;
      c             <= '0;
      nmatch        <= '0;
      cp_v          <= 1'b0;
      cp_addr       <= '0;
      match_done    <= 1'b0;
      frame_corners <= '0;
      frame_matches <= '0;
    end else begin
      match_done <= 1'b0;
      cp_v       <= (state == S_COPY) && (c < nf);
      cp_addr    <= c[AW-1:0];
      unique case (state)
        S_CLEAR: begin
          if (c == (AW+1)'(MAX_CORNERS - 1)) begin
            c     <= '0;
            state <= S_COLLECT;
          end else begin
            c <= c + 1'b1;
          end
        end
        S_COLLECT: begin
          if (frame_done) begin
            nf     <= n1 + (AW+1)'(wr_ok);
            i      <= '0;
            nmatch <= '0;
            state  <= S_START;
          end
        end
        S_START: begin
          if (nf == '0 || n2 == '0) begin
            frame_corners <= nf;
            frame_matches <= '0;
            match_done    <= 1'b1;
            c             <= '0;
            state         <= S_COPY;
          end else begin
            state <= S_RD1;
          end
        end
        S_RD1: state <= S_LAT;
        S_LAT: begin
          cur   <= r1_rdata;
          j     <= (AW+1)'(1);
          state <= S_SCAN;
        end
        S_SCAN: begin
          if (r2_rdata.r == cur.r) begin
            prev  <= r2_rdata;
            state <= S_PUSH;
          end else if (j < n2) begin
            j <= j + 1'b1;
          end else if (last_i) begin
            frame_corners <= nf;
            frame_matches <= nmatch;
            match_done    <= 1'b1;
            c             <= '0;
            state         <= S_COPY;
          end else begin
            i     <= i + 1'b1;
            state <= S_RD1;
          end
        end
        S_PUSH: begin
          if (push) begin
            nmatch <= nmatch + 1'b1;
            if (last_i) begin
              frame_corners <= nf;
              frame_matches <= nmatch + 1'b1;
              match_done    <= 1'b1;
              c             <= '0;
              state         <= S_COPY;
            end else begin
              i     <= i + 1'b1;
              state <= S_RD1;
            end
          end
        end
        S_COPY: begin
          if (c < nf) begin
            c <= c + 1'b1;
          end else begin
            n2    <= nf;
            state <= S_COLLECT;
          end
        end
        default: state <= S_CLEAR;
      endcase
    end
  end

  // No corner may arrive while a frame is being matched, and the copy must
  // be ahead of the new frame's writes into RAM 1.
  assert property (@(posedge clk) disable iff (!rst_n)
                   corner_valid |-> (state == S_COLLECT || state == S_COPY))
    else $error("corner_matcher: corner arrived while matching");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_ok && state == S_COPY) |-> (n1 < c))
    else $error("corner_matcher: new corner overtook the RAM copy");
  assert property (@(posedge clk) disable iff (!rst_n)
                   frame_done |-> (state == S_COLLECT))
    else $error("corner_matcher: frame ended before the last match finished");

endmodule
