// scan_fill: the Fill processing element, an even-odd scanline filler.
//
// The outline has already been drawn, so a scanline holds only edge
// pixels. The filler walks one scanline left to right reading one pixel
// per cycle from the image cache. Every run of black pixels counts as one
// edge crossing; the x position where the run starts is pushed onto a
// small edge stack. At the end of the line an unpaired top entry (odd
// count) is dropped, then pairs are popped and every pixel from the left
// edge to the right edge of each pair is written black. This is the
// even-odd rule: the fill value flips at each edge. Treating a run of
// adjacent black pixels as a single edge, dropping the unpaired edge and
// the stack depth are this design's choices; edges beyond EDGE_DEPTH are
// ignored and reported on edge_overflow.
//
// Interface to the cache: line_ready says a loaded scanline waits;
// px_addr/px_we/px_wdata address it one pixel at a time; px_rdata
// returns the pixel read one cycle earlier; line_done pulses when the
// line is finished. Timing per line: W cycles of reading, 3 cycles of
// overhead, then one cycle per pixel filled.
module scan_fill
  import font_pkg::*;
#(
  parameter int unsigned W          = 256,  // pixels per scanline
  parameter int unsigned EDGE_DEPTH = 16    // entries of the edge stack
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   line_ready,
  output logic   line_done,
  output coord_t px_addr,
  output logic   px_we,
  output logic   px_wdata,
  input  logic   px_rdata,
  output logic   edge_overflow
);

  localparam int unsigned EW = $clog2(EDGE_DEPTH+1);

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_LAST, S_PAIR, S_FILL, S_DONE} state_e;
  state_e state;

  coord_t          rx;          // next pixel to read
  coord_t          dx;          // pixel whose data arrives this cycle
  logic            dvalid;      // px_rdata holds pixel dx
  logic            prev;        // colour of the pixel left of dx
  coord_t          estack [EDGE_DEPTH];
  logic [EW-1:0]   ecount;
  coord_t          fx, fend;    // current fill span

  // a datum arrives in S_SCAN (after the first read) and in S_LAST
  logic edge_seen;
  assign edge_seen = dvalid && px_rdata && !prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      rx            <= '0;
      dx            <= '0;
      dvalid        <= 1'b0;
      prev          <= 1'b0;
      ecount        <= '0;
      fx            <= '0;
      fend          <= '0;
      line_done     <= 1'b0;
      edge_overflow <= 1'b0;
    end else begin
      line_done     <= 1'b0;
      edge_overflow <= 1'b0;
      // edge detection on the returning pixel stream
      if (dvalid) begin
        prev <= px_rdata;
        if (edge_seen) begin
          if (ecount != EW'(EDGE_DEPTH)) begin
            estack[ecount[$clog2(EDGE_DEPTH)-1:0]] <= dx;
            ecount <= ecount + 1'b1;
          end else begin
            edge_overflow <= 1'b1;
          end
        end
      end
      unique case (state)
        S_IDLE: begin
          dvalid <= 1'b0;
          if (line_ready && !line_done) begin   // not the line just finished
            state  <= S_SCAN;
            rx     <= '0;
            prev   <= 1'b0;
            ecount <= '0;
          end
        end
        S_SCAN: begin
          dvalid <= 1'b1;
          dx     <= rx;
          rx     <= rx + 1'b1;
          if (rx == coord_t'(W-1)) state <= S_LAST;
        end
        S_LAST: begin
          dvalid <= 1'b0;
          state  <= S_PAIR;
        end
        S_PAIR: begin
          // ecount is final here; drop an unpaired top entry first
          if (ecount[0]) begin
            ecount <= ecount - 1'b1;
          end else if (ecount != '0) begin
            fend   <= estack[$clog2(EDGE_DEPTH)'(ecount - 1)];
            fx     <= estack[$clog2(EDGE_DEPTH)'(ecount - 2)];
            ecount <= ecount - EW'(2);
            state  <= S_FILL;
          end else begin
            state  <= S_DONE;
          end
        end
        S_FILL: begin
          fx <= fx + 1'b1;
          if (fx == fend) state <= S_PAIR;
        end
        S_DONE: begin
          line_done <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign px_addr  = (state == S_FILL) ? fx : rx;
  assign px_we    = (state == S_FILL);
  assign px_wdata = 1'b1;

endmodule
