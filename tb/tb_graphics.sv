// tb_graphics: self-checking test of the VGA frame-buffer output at a
// reduced raster (16x8 visible pixels, scale 2) with the pixel clock enable
// high every other cycle. A memory model in the testbench holds a known
// pattern. Checked over three frames: every output pixel's colour equals the
// frame-buffer byte of its raster position (two pixel clocks of latency
// being accounted for by position counting), blank is high exactly outside
// the visible area, and hsync/vsync pulses have the programmed widths and
// periods.
module tb_graphics;
  import dmp_pkg::*;
  localparam int unsigned H_ACT = 16, H_FP = 2, H_SYNC = 3, H_BP = 2;
  localparam int unsigned V_ACT = 8, V_FP = 1, V_SYNC = 2, V_BP = 1;
  localparam int unsigned SCALE = 2;
  localparam logic [15:0] FB_BASE = 16'h0100;
  localparam int unsigned H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_ACT + V_FP + V_SYNC + V_BP;

  logic clk = 1'b0, rst_n = 1'b0, pix_ce = 1'b0;
  logic fb_en;
  addr_t fb_addr;
  data_t fb_rdata;
  logic hsync_n, vsync_n, blank, frame_start;
  logic [2:0] red, green;
  logic [1:0] blue;
  int checks = 0, failures = 0;

  graphics #(.H_ACT(H_ACT), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
             .V_ACT(V_ACT), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
             .SCALE(SCALE), .FB_BASE(FB_BASE)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame buffer pattern: byte at offset o is o*7+3
  function automatic data_t pat(int o);
    return data_t'(o * 7 + 3);
  endfunction
  always_ff @(posedge clk) if (fb_en) fb_rdata <= pat(int'(fb_addr) - int'(FB_BASE));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int x, y, frames, hs_len, vs_lines, hs_count;
    logic prev_hs;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // find the first frame start
    x = 0; y = 0; frames = 0; hs_len = 0; hs_count = 0; vs_lines = 0; prev_hs = 1;
    while (frames < 4) begin
      @(negedge clk); pix_ce = 1;
      @(posedge clk); #1;
      @(negedge clk); pix_ce = 0;
      // outputs now belong to raster position (x, y) once a frame has started
      if (frame_start) begin
        if (frames > 0) check("frame length", x == 0 && y == 0);
        x = 0; y = 0; frames++;
        if (frames > 1) check("vsync lines", vs_lines == V_SYNC * H_TOT);
        vs_lines = 0;
      end
      if (frames > 0) begin
        logic vis;
        vis = (x < H_ACT) && (y < V_ACT);
        check("blank", blank == !vis);
        if (vis) check("pixel", {red, green, blue} == pat((y / SCALE) * (H_ACT / SCALE) + x / SCALE));
        else     check("black", {red, green, blue} == '0);
        check("hsync position", hsync_n == !(x >= H_ACT + H_FP && x < H_ACT + H_FP + H_SYNC));
        check("vsync position", vsync_n == !(y >= V_ACT + V_FP && y < V_ACT + V_FP + V_SYNC));
        if (!vsync_n) vs_lines++;
        if (!hsync_n) hs_len++;
        if (hsync_n && !prev_hs) begin
          check("hsync width", hs_len == H_SYNC); hs_len = 0; hs_count++;
        end
        prev_hs = hsync_n;
        x++;
        if (x == H_TOT) begin x = 0; y = (y == V_TOT - 1) ? 0 : y + 1; end
      end
    end
    check("hsync pulses", hs_count >= 3 * V_TOT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
