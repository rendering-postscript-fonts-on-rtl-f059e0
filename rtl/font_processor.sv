// font_processor: outline font rasteriser for an FPGA co-processor card.
//
// The host loads a character's outline program (PostScript-style path
// operators moveto, lineto, curveto, closepath, fill with 8-bit
// coordinates) into the on-chip input memory and pulses start. The
// control logic fetches and decodes the program and drives the
// processing elements:
//   MoveTo          current point / subpath start registers
//   Line Render     Bresenham lines written straight into external memory
//   Bezier Flatten  recursive subdivision with an on-chip stack; its points
//                   go through a FIFO to the line renderer
//   Closepath       closing line back to the subpath start
//   Fill            even-odd scanline fill working from a 32-scanline
//                   on-chip image cache
// The 256 x 256 image lives in an external SRAM, one pixel per byte at
// address {y, x}, which the host must clear before a character is drawn.
// While the outline is drawn the line renderer owns the SRAM port; during
// fill the image cache owns it, and writes each finished scanline back
// packed as 32 bytes (pixels 8b..8b+7 in byte {y, b}, leftmost in bit 0).
//
// Interface: host write port (16-bit words into the input memory), start,
// busy, done (one-cycle pulse at the end), error (unknown op-code),
// edge_overflow (a scanline had more edges than the fill can pair), and a
// single-cycle synchronous SRAM port (read data the cycle after the
// address). The block structure follows the published design; widths,
// depths, handshakes and memory layout details are this design's own.
module font_processor
  import font_pkg::*;
#(
  parameter int unsigned IMEM_BYTES  = 512,   // input memory, one BlockRAM
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned FRAC        = 4,
  parameter int unsigned MAX_DEPTH   = 10,
  parameter int unsigned STACK_DEPTH = 16,
  parameter longint      FLAT_TOL    = 1024,
  parameter int unsigned EDGE_DEPTH  = 16,
  parameter int unsigned CACHE_LINES = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              host_wr_en,
  input  logic [$clog2(IMEM_BYTES)-2:0] host_wr_addr,
  input  logic [15:0]       host_wr_data,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              error,
  output logic              edge_overflow,  // fill met more edges than it stores
  // external image memory
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata
);

  localparam int unsigned IMG_W = 1 << COORD_W;   // 256 pixels, 256 lines

  // ---------------------------------------------------------------- nets
  logic [$clog2(IMEM_BYTES)-1:0] im_rd_addr;
  logic [7:0]   im_rd_data;

  logic   move_en, cur_en, move_done;
  point_t move_pt, cur_pt_in, cur_pt, first_pt;

  logic   line_start, line_busy, line_done, ln_we;
  point_t line_p0, line_p1;
  logic [ADDR_W-1:0] ln_addr;
  logic [DATA_W-1:0] ln_wdata;

  logic   bez_start, bez_busy, bez_done, bez_valid, bez_ready;
  point_t bez_p1, bez_p2, bez_p3, bez_p4, bez_pt;

  logic   fifo_valid, fifo_ready, fifo_full;
  point_t fifo_pt;

  logic   cp_start, cp_line_req, cp_line_ack, cp_done, cp_set_cur, cp_drew;
  point_t cp_line_p0, cp_line_p1;

  logic   fill_start, fill_done, cache_busy, mem_sel;
  logic   ic_en, ic_we;
  logic [ADDR_W-1:0] ic_addr;
  logic [DATA_W-1:0] ic_wdata;
  logic   line_ready, fl_line_done, px_we, px_wdata, px_rdata;
  coord_t line_y, px_addr;

  // ------------------------------------------------------------- blocks
  input_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk,
    .wr_en(host_wr_en), .wr_addr(host_wr_addr), .wr_data(host_wr_data),
    .rd_addr(im_rd_addr), .rd_data(im_rd_data)
  );

  font_ctrl #(.IMEM_BYTES(IMEM_BYTES)) u_ctrl (
    .clk, .rst_n,
    .start, .busy, .done, .error,
    .rd_addr(im_rd_addr), .rd_data(im_rd_data),
    .move_en, .move_pt, .cur_en, .cur_pt_in, .cur_pt, .first_pt, .move_done,
    .line_start, .line_p0, .line_p1, .line_busy, .line_done,
    .bez_start, .bez_p1, .bez_p2, .bez_p3, .bez_p4, .bez_done,
    .fifo_valid, .fifo_ready, .fifo_pt,
    .cp_start, .cp_line_req, .cp_line_p0, .cp_line_p1, .cp_line_ack,
    .cp_done, .cp_set_cur,
    .fill_start, .fill_done, .mem_sel
  );

  moveto_unit u_moveto (
    .clk, .rst_n,
    .move_en, .move_pt, .cur_en, .cur_pt_in,
    .cur_pt, .first_pt, .move_done
  );

  line_render u_line (
    .clk, .rst_n,
    .start(line_start), .p0(line_p0), .p1(line_p1),
    .busy(line_busy), .done(line_done),
    .mem_we(ln_we), .mem_addr(ln_addr), .mem_wdata(ln_wdata)
  );

  bezier_flatten #(
    .FRAC(FRAC), .MAX_DEPTH(MAX_DEPTH), .STACK_DEPTH(STACK_DEPTH), .FLAT_TOL(FLAT_TOL)
  ) u_bezier (
    .clk, .rst_n,
    .start(bez_start), .p1(bez_p1), .p2(bez_p2), .p3(bez_p3), .p4(bez_p4),
    .busy(bez_busy), .done(bez_done),
    .out_valid(bez_valid), .out_ready(bez_ready), .out_pt(bez_pt)
  );

  point_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(bez_valid), .in_ready(bez_ready), .in_pt(bez_pt),
    .out_valid(fifo_valid), .out_ready(fifo_ready), .out_pt(fifo_pt),
    .full(fifo_full)
  );

  closepath_unit u_close (
    .clk, .rst_n,
    .start(cp_start), .cur_pt, .first_pt,
    .line_req(cp_line_req), .line_p0(cp_line_p0), .line_p1(cp_line_p1),
    .line_ack(cp_line_ack), .line_done,
    .done(cp_done), .set_cur(cp_set_cur), .drew(cp_drew)
  );

  image_cache #(.W(IMG_W), .NLINES(CACHE_LINES), .NUM_LINES(IMG_W)) u_cache (
    .clk, .rst_n,
    .start(fill_start), .busy(cache_busy), .done(fill_done),
    .mem_en(ic_en), .mem_we(ic_we), .mem_addr(ic_addr),
    .mem_wdata(ic_wdata), .mem_rdata,
    .line_ready, .line_y, .line_done(fl_line_done),
    .px_addr, .px_we, .px_wdata, .px_rdata
  );

  scan_fill #(.W(IMG_W), .EDGE_DEPTH(EDGE_DEPTH)) u_fill (
    .clk, .rst_n,
    .line_ready, .line_done(fl_line_done),
    .px_addr, .px_we, .px_wdata, .px_rdata,
    .edge_overflow
  );

  // ------------------------------------------- external memory steering
  always_comb begin
    if (mem_sel) begin
      mem_en    = ic_en;
      mem_we    = ic_we;
      mem_addr  = ic_addr;
      mem_wdata = ic_wdata;
    end else begin
      mem_en    = ln_we;
      mem_we    = ln_we;
      mem_addr  = ln_addr;
      mem_wdata = ln_wdata;
    end
  end

endmodule
