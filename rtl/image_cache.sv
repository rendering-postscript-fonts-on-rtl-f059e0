// image_cache: on-chip scanline cache between the external image memory
// and the Fill element.
//
// In external memory the image is stored one pixel per byte (256 x 256
// bytes, address {y, x}); the fill wants single-bit access. The cache
// holds NLINES scanlines at one bit per pixel (32 x 256 bits = two 4 Kbit
// BlockRAMs) as a ring of slots; scanline y lives in slot y mod NLINES.
// A controller owns the external memory port and, one action at a time,
//   * writes back a scanline the fill has finished, packed eight pixels
//     per byte: W/8 = 32 writes, byte b holding pixels 8b..8b+7 with the
//     leftmost pixel in bit 0, at bytes {y, b} (the first 32 bytes of the
//     scanline's own row), or otherwise
//   * loads the next scanline: W = 256 reads, a pixel being black when
//     its byte is non-zero, while a slot is free.
// Write-back is served first so that slots are freed. Meanwhile the fill
// works on the oldest loaded scanline through its own pixel port. With
// one memory access per cycle the external traffic for a whole image is
// 256 x (256 + 32) = 73728 cycles. Where the packed bytes are written,
// their bit order and the order of actions are this design's choices.
//
// Timing: start (while idle) begins a pass over NUM_LINES scanlines from
// y = 0; done pulses when the last one has been written back. The
// external memory returns read data the cycle after the read. The fill
// port reads synchronously (px_rdata the cycle after px_addr) and writes
// at the clock edge.
module image_cache
  import font_pkg::*;
#(
  parameter int unsigned W         = 256,  // pixels per scanline
  parameter int unsigned NLINES    = 32,   // scanlines held on chip
  parameter int unsigned NUM_LINES = 256   // scanlines in the image
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // external memory
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  // fill side
  output logic              line_ready,
  output coord_t            line_y,
  input  logic              line_done,
  input  coord_t            px_addr,
  input  logic              px_we,
  input  logic              px_wdata,
  output logic              px_rdata
);

  localparam int unsigned SW = $clog2(NLINES);     // slot index bits
  localparam int unsigned LW = $clog2(NUM_LINES+1); // line counter bits
  localparam int unsigned BW = $clog2(W/8);          // byte-in-line bits

  logic line_mem [NLINES][W];

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_LOAD, S_WB} state_e;
  state_e state;

  logic [LW-1:0] n_load, n_ready, n_fill, n_wb;   // line counters
  coord_t        x;                               // load read pointer
  logic [BW-1:0] b;                               // write-back byte
  logic          pend;                            // read data due now
  coord_t        pend_x;
  logic [SW-1:0] pend_slot;

  logic [SW-1:0] load_slot, fill_slot, wb_slot;
  assign load_slot = n_load[SW-1:0];
  assign fill_slot = n_fill[SW-1:0];
  assign wb_slot   = n_wb[SW-1:0];

  // next action when the port becomes free
  logic want_wb, want_load, all_done;
  assign want_wb   = (n_fill != n_wb);
  assign want_load = (n_load != LW'(NUM_LINES)) && ((n_load - n_wb) < LW'(NLINES));
  assign all_done  = (n_wb == LW'(NUM_LINES));

  // packed byte for write-back
  logic [7:0] wb_byte;
  always_comb begin
    for (int i = 0; i < 8; i++) wb_byte[i] = line_mem[wb_slot][{b, 3'(i)}];
  end

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    if (state == S_LOAD) begin
      mem_en   = 1'b1;
      mem_addr = pix_addr(x, coord_t'(n_load));
    end else if (state == S_WB) begin
      mem_en    = 1'b1;
      mem_we    = 1'b1;
      mem_addr  = pix_addr(coord_t'(b), coord_t'(n_wb));
      mem_wdata = DATA_W'(wb_byte);
    end
  end

  // cache array: load port and fill port touch different slots
  always_ff @(posedge clk) begin
    if (pend) line_mem[pend_slot][pend_x] <= (mem_rdata != '0);
    if (px_we) line_mem[fill_slot][px_addr] <= px_wdata;
    px_rdata <= line_mem[fill_slot][px_addr];
  end

  function automatic state_e pick(logic wb, logic ld);
    if (wb)      return S_WB;
    else if (ld) return S_LOAD;
    else         return S_RUN;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      n_load  <= '0;
      n_ready <= '0;
      n_fill  <= '0;
      n_wb    <= '0;
      x       <= '0;
      b       <= '0;
      pend    <= 1'b0;
      pend_x  <= '0;
      pend_slot <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      pend <= 1'b0;
      if (pend && pend_x == coord_t'(W-1)) n_ready <= n_ready + 1'b1;
      if (line_done) n_fill <= n_fill + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          n_load  <= '0;
          n_ready <= '0;
          n_fill  <= '0;
          n_wb    <= '0;
          state   <= S_RUN;
        end
        S_RUN: begin
          if (all_done) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= pick(want_wb, want_load);
            x     <= '0;
            b     <= '0;
          end
        end
        S_LOAD: begin
          pend      <= 1'b1;
          pend_x    <= x;
          pend_slot <= load_slot;
          x         <= x + 1'b1;
          if (x == coord_t'(W-1)) begin
            n_load <= n_load + 1'b1;
            state  <= S_RUN;
          end
        end
        S_WB: begin
          b <= b + 1'b1;
          if (b == BW'(W/8-1)) begin
            n_wb  <= n_wb + 1'b1;
            state <= S_RUN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state != S_IDLE);
  assign line_ready = busy && (n_ready != n_fill);
  assign line_y     = coord_t'(n_fill);

  assert property (@(posedge clk) disable iff (!rst_n) line_done |-> (n_ready != n_fill))
    else $error("image_cache: line_done without a loaded line");

endmodule
