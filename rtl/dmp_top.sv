// dmp_top: deterministic multiprocessing memory system for NCPU processors.
//
// Each processor reaches memory through its own arbitrator, which buffers
// every load and store of the current parallel phase in a private CAM
// buffer and snoops the other arbitrators' buffers to detect communication
// between threads. An instruction counter per processor ends its time slice
// after a programmed number of instructions. The phase state machine runs
// the parallel phase until every processor is halted, then commits the
// buffered writes to main memory in a deterministic round-robin order, then
// gives each processor a short serial time slice of direct memory access.
// The memory controller queues the arbitrators' accesses to a block-RAM main
// memory, whose second port feeds the VGA graphics device.
//
// The processors themselves (PicoBlaze-class cores with halt and
// instruction-retire signals) are outside this module: each one connects
// through the cpu_* ports. A processor must
//   - hold cpu_req (with cpu_we, cpu_addr, cpu_wdata) until cpu_ack, which
//     pulses for one cycle with cpu_rdata;
//   - start no instruction while cpu_halt is high;
//   - pulse cpu_retire once for each instruction it completes.
// par_slice and ser_slice are the parallel and serial time slices in
// instructions. arb_ev, phase, epoch, ic_expired, ic_count and mem_q_count are for
// observation only.
//
// The wiring follows the block diagram of the design: CPU0..CPU2 with their
// instruction counters, one arbitrator and one CAM buffer per CPU, all
// arbitrators connected to each other and to main memory, main memory to the
// graphics module, and the phase state machine to the counters and the
// arbitrators.
module dmp_top
  import dmp_pkg::*;
#(
  parameter int unsigned NCPU     = NCPU_DEF,
  parameter int unsigned CAM_DEPTH = 16,
  parameter int unsigned QDEPTH   = 4,
  parameter int unsigned CNT_W    = CNT_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] par_slice,
  input  logic [CNT_W-1:0] ser_slice,
  // processors
  input  logic [NCPU-1:0]  cpu_req,
  input  logic [NCPU-1:0]  cpu_we,
  input  addr_t            cpu_addr  [NCPU],
  input  data_t            cpu_wdata [NCPU],
  output logic [NCPU-1:0]  cpu_ack,
  output data_t            cpu_rdata [NCPU],
  output logic [NCPU-1:0]  cpu_halt,
  input  logic [NCPU-1:0]  cpu_retire,
  // graphics
  input  logic             pix_ce,
  output logic             vga_hsync_n,
  output logic             vga_vsync_n,
  output logic             vga_blank,
  output logic [2:0]       vga_red,
  output logic [2:0]       vga_green,
  output logic [1:0]       vga_blue,
  output logic             vga_frame_start,
  // observation
  output phase_e           phase,
  output logic [31:0]      epoch,
  output arb_ev_t          arb_ev    [NCPU],
  output logic [NCPU-1:0]  ic_expired,
  output logic [CNT_W-1:0] ic_count  [NCPU],
  output logic [$clog2(QDEPTH):0] mem_q_count
);

  // phase state machine and instruction counters
  logic [NCPU-1:0]  halted, commit_done, commit_go, serial_turn, ic_load;
  logic [CNT_W-1:0] ic_limit;

  phase_fsm #(.NCPU(NCPU), .CNT_W(CNT_W)) u_phase (
    .clk, .rst_n, .par_slice, .ser_slice, .halted, .commit_done,
    .phase, .commit_go, .serial_turn, .ic_load, .ic_limit, .epoch
  );

  // snoop interconnect: every arbitrator drives one bus and reads all;
  // answers are routed from answerer j to requester i.
  snoop_req_t sn_bus  [NCPU];
  snoop_rsp_e rsp_from[NCPU][NCPU];   // [answerer][requester]
  snoop_rsp_e rsp_to  [NCPU][NCPU];   // [requester][answerer]

  always_comb begin
    for (int unsigned i = 0; i < NCPU; i++)
      for (int unsigned j = 0; j < NCPU; j++)
        rsp_to[i][j] = rsp_from[j][i];
  end

  // memory controller ports
  mem_req_t        mreq [NCPU];
  mem_rsp_t        mrsp [NCPU];
  logic [NCPU-1:0] mgnt;

  for (genvar i = 0; i < NCPU; i++) begin : g_cpu
    instr_counter #(.CNT_W(CNT_W)) u_ic (
      .clk, .rst_n, .load(ic_load[i]), .limit(ic_limit),
      .retire(cpu_retire[i]), .count(ic_count[i]), .expired(ic_expired[i])
    );

    arbitrator #(.NCPU(NCPU), .ID(i), .DEPTH(CAM_DEPTH)) u_arb (
      .clk, .rst_n,
      .cpu_req(cpu_req[i]), .cpu_we(cpu_we[i]), .cpu_addr(cpu_addr[i]),
      .cpu_wdata(cpu_wdata[i]), .cpu_ack(cpu_ack[i]), .cpu_rdata(cpu_rdata[i]),
      .cpu_halt(cpu_halt[i]), .ic_expired(ic_expired[i]),
      .phase, .serial_turn(serial_turn[i]), .commit_go(commit_go[i]),
      .commit_done(commit_done[i]), .halted(halted[i]),
      .sn_out(sn_bus[i]), .sn_in(sn_bus), .rsp_out(rsp_from[i]), .rsp_in(rsp_to[i]),
      .mreq(mreq[i]), .mgnt(mgnt[i]), .mrsp(mrsp[i]),
      .ev(arb_ev[i])
    );
  end

  logic  m_en, m_we;
  addr_t m_addr;
  data_t m_wdata, m_rdata;
  logic  fb_en;
  addr_t fb_addr;
  data_t fb_rdata;

  mem_ctrl #(.NCPU(NCPU), .QDEPTH(QDEPTH)) u_memctl (
    .clk, .rst_n, .req(mreq), .gnt(mgnt), .rsp(mrsp),
    .mem_en(m_en), .mem_we(m_we), .mem_addr(m_addr), .mem_wdata(m_wdata),
    .mem_rdata(m_rdata), .q_count(mem_q_count)
  );

  main_mem u_mem (
    .clk,
    .a_en(m_en), .a_we(m_we), .a_addr(m_addr), .a_wdata(m_wdata), .a_rdata(m_rdata),
    .b_en(fb_en), .b_addr(fb_addr), .b_rdata(fb_rdata)
  );

  graphics u_gfx (
    .clk, .rst_n, .pix_ce,
    .fb_en, .fb_addr, .fb_rdata,
    .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n), .blank(vga_blank),
    .red(vga_red), .green(vga_green), .blue(vga_blue),
    .frame_start(vga_frame_start)
  );

endmodule
