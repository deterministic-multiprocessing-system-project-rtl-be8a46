// graphics: VGA output that displays a region of main memory.
//
// A raster generator counts pixels and lines of a 640x480 VGA frame
// (standard 25.175 MHz timing: 800 clocks per line, 525 lines per frame,
// negative sync pulses). Each visible pixel is fetched from a frame buffer
// of (H_ACT/SCALE) x (V_ACT/SCALE) bytes that starts at FB_BASE in main
// memory, one byte per displayed pixel in RGB 3-3-2 format, each stored
// pixel covering SCALE x SCALE screen pixels. The read goes through the
// memory's second (read-only) port, so the display never competes with
// the arbitrators.
//
// The description states only that a region of main memory is mapped to a
// VGA controller as a frame buffer; the resolution, the frame buffer size
// and base address, the pixel format, the scaling and the use of a second
// memory port are this design's choices.
//
// Timing: the raster advances on cycles with `pix_ce` high (the pixel clock
// as a clock enable of `clk`). Sync, blank and colour leave the module two
// pixel clocks after the raster position they belong to, all aligned with
// each other.
module graphics
  import dmp_pkg::*;
#(
  parameter int unsigned H_ACT   = 640,
  parameter int unsigned H_FP    = 16,
  parameter int unsigned H_SYNC  = 96,
  parameter int unsigned H_BP    = 48,
  parameter int unsigned V_ACT   = 480,
  parameter int unsigned V_FP    = 10,
  parameter int unsigned V_SYNC  = 2,
  parameter int unsigned V_BP    = 33,
  parameter int unsigned SCALE   = 4,
  parameter logic [ADDR_W-1:0] FB_BASE = 16'h8000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_ce,
  // frame buffer read port (one-cycle latency)
  output logic        fb_en,
  output addr_t       fb_addr,
  input  data_t       fb_rdata,
  // VGA
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        blank,
  output logic [2:0]  red,
  output logic [2:0]  green,
  output logic [1:0]  blue,
  output logic        frame_start   // one pulse at the first pixel of a frame
);

  localparam int unsigned H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_ACT + V_FP + V_SYNC + V_BP;
  localparam int unsigned FB_W  = H_ACT / SCALE;

  logic [11:0] hc_q, vc_q;
  logic        vis0, hs0, vs0;
  logic        vis1_q, hs1_q, vs1_q;

  assign vis0 = (hc_q < 12'(H_ACT)) && (vc_q < 12'(V_ACT));
  assign hs0  = (hc_q >= 12'(H_ACT + H_FP)) && (hc_q < 12'(H_ACT + H_FP + H_SYNC));
  assign vs0  = (vc_q >= 12'(V_ACT + V_FP)) && (vc_q < 12'(V_ACT + V_FP + V_SYNC));

  // Frame buffer address of the current raster position.
  logic [ADDR_W-1:0] px, py;
  assign px      = ADDR_W'(hc_q / 12'(SCALE));
  assign py      = ADDR_W'(vc_q / 12'(SCALE));
  assign fb_addr = FB_BASE + py * ADDR_W'(FB_W) + px;
  assign fb_en   = pix_ce && vis0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc_q        <= '0;
      vc_q        <= '0;
      vis1_q      <= 1'b0;
      hs1_q       <= 1'b0;
      vs1_q       <= 1'b0;
      hsync_n     <= 1'b1;
      vsync_n     <= 1'b1;
      blank       <= 1'b1;
      red         <= '0;
      green       <= '0;
      blue        <= '0;
      frame_start <= 1'b0;
    end else if (pix_ce) begin
      // raster counters
      if (hc_q == 12'(H_TOT - 1)) begin
        hc_q <= '0;
        vc_q <= (vc_q == 12'(V_TOT - 1)) ? '0 : vc_q + 1'b1;
      end else begin
        hc_q <= hc_q + 1'b1;
      end
      // stage 1: memory read in flight
      vis1_q <= vis0;
      hs1_q  <= hs0;
      vs1_q  <= vs0;
      frame_start <= 1'b0;
      // stage 2: outputs
      hsync_n <= !hs1_q;
      vsync_n <= !vs1_q;
      blank   <= !vis1_q;
      {red, green, blue} <= vis1_q ? fb_rdata : '0;
      if (hc_q == 12'd1 && vc_q == 12'd0) frame_start <= 1'b1;
    end
  end

endmodule
