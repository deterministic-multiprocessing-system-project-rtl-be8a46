// tb_cam_buffer: self-checking test of the CAM buffer against a reference
// model kept in the testbench. Each cycle applies a random mix of
// allocation, owner update, single-slot invalidate, snoop-side share and
// erase, and occasional clear-all, then checks the local and snoop lookups,
// the commit read port, the fill pointer and the full flag.
module tb_cam_buffer;
  import dmp_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned NSN   = 3;
  localparam int unsigned IW    = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  addr_t lk_addr, alloc_addr, rd_addr;
  logic lk_hit, alloc, full, upd, upd_data_en, inv, rd_valid, clear;
  logic [IW-1:0] lk_idx, alloc_idx, upd_idx, inv_idx, rd_idx;
  tag_t lk_tag, alloc_tag, upd_tag, rd_tag;
  data_t lk_data, alloc_data, upd_data, rd_data;
  addr_t sn_addr [NSN];
  logic  sn_hit [NSN], sn_share [NSN], sn_erase [NSN];
  tag_t  sn_tag [NSN];
  int checks = 0, failures = 0;

  cam_buffer #(.DEPTH(DEPTH), .NSN(NSN)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic  m_valid [DEPTH];
  addr_t m_addr  [DEPTH];
  data_t m_data  [DEPTH];
  tag_t  m_tag   [DEPTH];
  int    m_fill;
  int    n_full, n_share, n_erase, n_hit;

  // Addresses come from a small pool so that hits are frequent.
  function automatic addr_t pool_addr();
    return addr_t'($urandom_range(0, 11) * 37);
  endfunction

  function automatic int m_find(addr_t a);
    for (int k = 0; k < DEPTH; k++) if (m_valid[k] && m_addr[k] == a) return k;
    return -1;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int f;
    alloc = 0; upd = 0; upd_data_en = 0; inv = 0; clear = 0;
    lk_addr = '0; alloc_addr = '0; alloc_data = '0; alloc_tag = '0;
    upd_idx = '0; upd_tag = '0; upd_data = '0; inv_idx = '0; rd_idx = '0;
    for (int p = 0; p < NSN; p++) begin
      sn_addr[p] = '0; sn_share[p] = 0; sn_erase[p] = 0;
    end
    for (int k = 0; k < DEPTH; k++) begin
      m_valid[k] = 0; m_addr[k] = '0; m_data[k] = '0; m_tag[k] = '0;
    end
    m_fill = 0; n_full = 0; n_share = 0; n_erase = 0; n_hit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // ---- check lookups of the present state
      lk_addr = pool_addr();
      f = m_find(lk_addr);
      #1;
      check("lk_hit", lk_hit == (f >= 0));
      if (f >= 0) begin
        n_hit++;
        check("lk_idx", int'(lk_idx) == f);
        check("lk_tag", lk_tag == m_tag[f]);
        check("lk_data", lk_data == m_data[f]);
      end
      check("full", full == (m_fill == DEPTH));
      check("alloc_idx", full || int'(alloc_idx) == m_fill);
      if (full) n_full++;
      rd_idx = IW'($urandom_range(0, DEPTH - 1));
      #1;
      check("rd_valid", rd_valid == m_valid[rd_idx]);
      if (m_valid[rd_idx])
        check("rd port", rd_addr == m_addr[rd_idx] && rd_data == m_data[rd_idx] && rd_tag == m_tag[rd_idx]);
      for (int p = 0; p < NSN; p++) sn_addr[p] = pool_addr();
      #1;
      for (int p = 0; p < NSN; p++) begin
        f = m_find(sn_addr[p]);
        check("sn_hit", sn_hit[p] == (f >= 0));
        if (f >= 0) check("sn_tag", sn_tag[p] == m_tag[f]);
      end
      // ---- choose this cycle's changes (distinct slots for owner and snoop)
      clear = ($urandom_range(0, 99) == 0);
      alloc = 0; upd = 0; inv = 0; upd_data_en = 0;
      if ($urandom_range(0, 2) == 0 && m_find(lk_addr) < 0 && !full) begin
        alloc = 1; alloc_addr = lk_addr; alloc_data = data_t'($urandom);
        alloc_tag = tag_t'($urandom_range(0, 7));
      end else if (lk_hit && $urandom_range(0, 1) == 0) begin
        upd = 1; upd_idx = lk_idx; upd_tag = tag_t'($urandom_range(0, 7));
        upd_data_en = $urandom_range(0, 1); upd_data = data_t'($urandom);
      end else if ($urandom_range(0, 3) == 0) begin
        inv = 1; inv_idx = IW'($urandom_range(0, DEPTH - 1));
      end
      for (int p = 0; p < NSN; p++) begin
        f = m_find(sn_addr[p]);
        sn_share[p] = ($urandom_range(0, 3) == 0) && !(upd && f == int'(upd_idx));
        sn_erase[p] = ($urandom_range(0, 7) == 0) && !(inv && f == int'(inv_idx));
      end
      @(posedge clk);
      // ---- model update, in the same order as the buffer
      if (clear) begin
        m_fill = 0;
        for (int k = 0; k < DEPTH; k++) m_valid[k] = 0;
      end else begin
        // snoop-side hits are those seen before the edge
        int sh [NSN];
        for (int p = 0; p < NSN; p++) sh[p] = m_find(sn_addr[p]);
        if (alloc && m_fill < DEPTH) begin
          m_valid[m_fill] = 1; m_addr[m_fill] = alloc_addr;
          m_data[m_fill] = alloc_data; m_tag[m_fill] = alloc_tag; m_fill++;
        end
        if (upd) begin
          m_tag[upd_idx] = upd_tag;
          if (upd_data_en) m_data[upd_idx] = upd_data;
        end
        if (inv) m_valid[inv_idx] = 0;
        for (int p = 0; p < NSN; p++) begin
          if (sh[p] >= 0 && sn_share[p]) begin m_tag[sh[p]].excl = 0; n_share++; end
          if (sh[p] >= 0 && sn_erase[p]) begin m_valid[sh[p]] = 0; n_erase++; end
        end
      end
    end
    check("full reached", n_full > 0);
    check("shares applied", n_share > 0);
    check("erases applied", n_erase > 0);
    check("hits seen", n_hit > 0);
    $display("hits=%0d full=%0d shares=%0d erases=%0d", n_hit, n_full, n_share, n_erase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
