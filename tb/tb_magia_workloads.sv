`timescale 1ns/1ps
// tb_magia_workloads: the benchmark suite of the tile, run end to end at the
// tile's default size.
//
// Problem sizes are those of the evaluation: matrix-matrix multiply M x N x K
// with N = 96 and M = K = 1, 2, 4, ..., 64, 96; N x N matrix-vector with
// N = 64, 96, 128, 256; dot product N = 16 ... 2048; vector sum N = 16 ... 512.
// Each kernel runs as the control core would run it: iDMA copies the operands
// from L2 into L1, the engine is started through its control registers, the core
// sleeps on the Event Unit until the done event, and iDMA copies the result back
// to L2, where it is compared with a result computed here from the same inputs.
// RedMulE runs matrix-matrix, matrix-vector (K = 1) and dot product (M = K = 1)
// as GEMMs; Spatz runs all four kernels as tasks started through its control
// registers. The engines are behavioural models: they move every operand and
// result through their real L1 ports (16 RedMulE lanes, 4 Spatz vector ports
// plus the Snitch port) but compute on 32-bit integers instead of FP16, so
// the L1 traffic and the control flow are those of the tile while the engine
// cycle counts printed are only those of these models.
module tb_magia_workloads;
  import magia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- DUT ports ----------------
  logic core_clk, core_irq, spatz_clk, spatz_irq;
  obi_req_t core_req, ext_req, l2_req, sp_obi_req, rom_req;
  obi_rsp_t core_rsp, ext_rsp, l2_rsp, sp_obi_rsp, rom_rsp;
  obi_req_t sp_tcdm_req [SPATZ_HCI_PORTS];
  obi_rsp_t sp_tcdm_rsp [SPATZ_HCI_PORTS];
  obi_req_t rm_req [REDMULE_HCI_PORTS];
  obi_rsp_t rm_rsp [REDMULE_HCI_PORTS];
  redmule_cfg_t rm_cfg;
  logic rm_start, rm_clear, rm_done, rm_evt;
  idma_job_t dma_job [2];
  logic dma_jv [2], dma_jr [2], dma_done [2], dma_err [2];
  obi_req_t dma_req [2];
  obi_rsp_t dma_rsp [2];
  logic fs_req, fs_done, fs_err;
  logic [31:0] fs_aggr, fs_id;

  magia_tile dut (
    .clk_i(clk), .rst_ni(rst_n), .test_en_i(1'b0), .tile_id_i(8'd0),
    .core_clk_o(core_clk), .core_data_req_i(core_req), .core_data_rsp_o(core_rsp), .core_irq_o(core_irq),
    .ext_req_i(ext_req), .ext_rsp_o(ext_rsp), .l2_req_o(l2_req), .l2_rsp_i(l2_rsp),
    .spatz_clk_o(spatz_clk), .spatz_irq_o(spatz_irq), .spatz_obi_req_i(sp_obi_req), .spatz_obi_rsp_o(sp_obi_rsp),
    .spatz_tcdm_req_i(sp_tcdm_req), .spatz_tcdm_rsp_o(sp_tcdm_rsp),
    .spatz_rom_req_i(rom_req), .spatz_rom_rsp_o(rom_rsp),
    .redmule_tcdm_req_i(rm_req), .redmule_tcdm_rsp_o(rm_rsp), .redmule_cfg_o(rm_cfg),
    .redmule_start_o(rm_start), .redmule_soft_clear_o(rm_clear), .redmule_done_i(rm_done), .redmule_evt_i(rm_evt),
    .idma_job_o(dma_job), .idma_job_valid_o(dma_jv), .idma_job_ready_i(dma_jr), .idma_done_i(dma_done),
    .idma_error_i(dma_err), .idma_tcdm_req_i(dma_req), .idma_tcdm_rsp_o(dma_rsp),
    .fsync_req_o(fs_req), .fsync_aggr_o(fs_aggr), .fsync_id_o(fs_id), .fsync_done_i(fs_done), .fsync_error_i(fs_err)
  );

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++; $display("FAIL watchdog at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- OBI master tasks ----------------
`define OBI_TASK(NAME, REQ, RSP) \
  task automatic NAME(input logic [31:0] a, input logic we, input logic [31:0] d, \
                      output logic [31:0] rd, output logic err); \
    int n; \
    @(negedge clk); \
    REQ = '{req: 1'b1, addr: a, we: we, be: 4'hF, wdata: d, aid: '0}; \
    #1; n = 0; \
    while (!RSP.gnt && n < 50000000) begin @(negedge clk); #1; n++; end \
    @(negedge clk); \
    REQ.req = 1'b0; \
    n = 0; \
    while (!RSP.rvalid && n < 50000000) begin @(negedge clk); n++; end \
    rd = RSP.rdata; err = RSP.err; \
  endtask
  `OBI_TASK(core_acc, core_req, core_rsp)
  `OBI_TASK(sp_acc, sp_obi_req, sp_obi_rsp)
  `OBI_TASK(rom_acc, rom_req, rom_rsp)

  task automatic core_wr(logic [31:0] a, logic [31:0] d);
    logic [31:0] x; logic e; core_acc(a, 1'b1, d, x, e);
  endtask
  task automatic core_rd(logic [31:0] a, output logic [31:0] d);
    logic e; core_acc(a, 1'b0, '0, d, e);
  endtask
  task automatic sp_wr(logic [31:0] a, logic [31:0] d);
    logic [31:0] x; logic e; sp_acc(a, 1'b1, d, x, e);
  endtask
  task automatic sp_rd(logic [31:0] a, output logic [31:0] d);
    logic e; sp_acc(a, 1'b0, '0, d, e);
  endtask

  // ---------------- parallel TCDM lane bursts ----------------
`define LANE_TASK(NAME, REQ, RSP, N) \
  task automatic NAME(input logic [31:0] addr [N], input logic [N-1:0] use_l, input logic we, \
                      input logic [31:0] wd [N], output logic [31:0] rd [N]); \
    logic [N-1:0] pend, got; \
    pend = use_l; got = '0; \
    while (pend != '0 || got != '0) begin \
      @(negedge clk); \
      for (int l = 0; l < N; l++) if (got[l]) rd[l] = RSP[l].rdata; \
      got = '0; \
      for (int l = 0; l < N; l++) \
        REQ[l] = '{req: pend[l], addr: addr[l], we: we, be: 4'hF, wdata: wd[l], aid: '0}; \
      #1; \
      for (int l = 0; l < N; l++) if (pend[l] && RSP[l].gnt) begin got[l] = 1'b1; pend[l] = 1'b0; end \
    end \
    for (int l = 0; l < N; l++) REQ[l].req = 1'b0; \
  endtask
  `LANE_TASK(rm_burst, rm_req, rm_rsp, REDMULE_HCI_PORTS)
  `LANE_TASK(sp_burst, sp_tcdm_req, sp_tcdm_rsp, SPATZ_HCI_PORTS)

  // ---------------- operands ----------------
  // L2 holds a pseudo-random byte value at every word address.
  function automatic logic [31:0] l2_init(logic [31:0] a);
    logic [31:0] h; h = (a >> 2) * 32'h9E37_79B1; return {24'd0, h[31:24]};
  endfunction
  logic [31:0] l2mem [logic [31:0]];
  localparam logic [31:0] L2_A = L2_BASE + 32'h0100_0000, L2_B = L2_BASE + 32'h0200_0000;
  localparam logic [31:0] L2_C = L2_BASE + 32'h0300_0000;
  localparam logic [31:0] L1_A = 32'h0002_0000, L1_B = 32'h0006_0000, L1_C = 32'h0008_0000;
  localparam logic [31:0] PARAM_ADDR = 32'h000F_0000;
  localparam logic [31:0] RUNTIME = 32'h8000_0000;
  localparam logic [31:0] T_VSUM = 32'h8000_0400, T_DOTP = 32'h8000_0500,
                          T_MATVEC = 32'h8000_0600, T_MATMUL = 32'h8000_0700;
  assign fs_done = 1'b0;
  assign fs_err  = 1'b0;
  assign ext_req = '0;

  // ---------------- L2 memory on the L2 port (2-cycle answer) ----------------
  logic l2_busy, l2_rv; logic [31:0] l2_rd; int l2_cnt;
  logic [3:0] l2_rid;
  assign l2_rsp = '{gnt: l2_req.req && !l2_busy, rvalid: l2_rv, rdata: l2_rd, err: 1'b0, rid: l2_rid};
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin l2_busy <= 0; l2_rv <= 0; l2_cnt = 0; end
    else begin
      l2_rv <= 1'b0;
      if (l2_busy) begin l2_cnt--; if (l2_cnt == 0) begin l2_busy <= 0; l2_rv <= 1; end end
      if (l2_req.req && !l2_busy) begin
        l2_busy <= 1'b1; l2_cnt = 2; l2_rid <= l2_req.aid;
        if (l2_req.we) l2mem[l2_req.addr] = l2_req.wdata;
        else l2_rd <= l2mem.exists(l2_req.addr) ? l2mem[l2_req.addr] : l2_init(l2_req.addr);
      end
    end
  end

  // ---------------- iDMA back-end models ----------------
  int dma_jobs [2];
  for (genvar c = 0; c < 2; c++) begin : g_dma
    initial begin
      dma_jobs[c] = 0; dma_jr[c] = 0; dma_done[c] = 0; dma_err[c] = 0; dma_req[c] = '0;
      forever begin
        @(negedge clk);
        if (dma_jv[c]) begin
          idma_job_t j;
          @(negedge clk);
          j = dma_job[c];
          dma_jr[c] = 1; @(negedge clk); dma_jr[c] = 0;
          for (int w = 0; w < int'(j.length) / 4; w++) begin
            logic [31:0] d; int n;
            if (c == 0) d = l2mem.exists(j.src_addr + 4*w) ? l2mem[j.src_addr + 4*w] : l2_init(j.src_addr + 4*w);
            // L1 side access
            dma_req[c] = '{req: 1'b1, addr: (c == 0) ? j.dst_addr + 4*w : j.src_addr + 4*w,
                           we: (c == 0), be: 4'hF, wdata: d, aid: '0};
            #1; n = 0;
            while (!dma_rsp[c].gnt && n < 1000) begin @(negedge clk); #1; n++; end
            @(negedge clk); dma_req[c].req = 1'b0;
            if (c == 1) l2mem[j.dst_addr + 4*w] = dma_rsp[c].rdata;
          end
          dma_done[c] = 1; @(negedge clk); dma_done[c] = 0;
          dma_jobs[c]++;
        end
      end
    end
  end

  // ---------------- RedMulE engine model: Z[MxK] = X[MxN] * W[NxK] ----------------
  initial begin
    rm_done = 0; rm_evt = 0;
    for (int l = 0; l < REDMULE_HCI_PORTS; l++) rm_req[l] = '0;
    forever begin
      @(posedge clk);
      if (rm_start) begin
        logic [31:0] ad [REDMULE_HCI_PORTS], wd [REDMULE_HCI_PORTS], rd [REDMULE_HCI_PORTS];
        logic [31:0] xl [], wl [], zl [];
        int m_, n_, k_;
        m_ = int'(rm_cfg.mcfg0[31:16]); k_ = int'(rm_cfg.mcfg0[15:0]); n_ = int'(rm_cfg.mcfg1);
        xl = new [m_*n_]; wl = new [n_*k_]; zl = new [m_*k_];
        for (int b = 0; b < m_*n_; b += REDMULE_HCI_PORTS) begin
          logic [REDMULE_HCI_PORTS-1:0] use_l;
          for (int l = 0; l < REDMULE_HCI_PORTS; l++) begin
            use_l[l] = (b + l < m_*n_); ad[l] = rm_cfg.x_ptr + 4*(b + l); wd[l] = '0;
          end
          rm_burst(ad, use_l, 1'b0, wd, rd);
          for (int l = 0; l < REDMULE_HCI_PORTS; l++) if (use_l[l]) xl[b + l] = rd[l];
        end
        for (int b = 0; b < n_*k_; b += REDMULE_HCI_PORTS) begin
          logic [REDMULE_HCI_PORTS-1:0] use_l;
          for (int l = 0; l < REDMULE_HCI_PORTS; l++) begin
            use_l[l] = (b + l < n_*k_); ad[l] = rm_cfg.w_ptr + 4*(b + l); wd[l] = '0;
          end
          rm_burst(ad, use_l, 1'b0, wd, rd);
          for (int l = 0; l < REDMULE_HCI_PORTS; l++) if (use_l[l]) wl[b + l] = rd[l];
        end
        for (int i = 0; i < m_; i++) for (int j = 0; j < k_; j++) begin
          zl[i*k_ + j] = '0;
          for (int q = 0; q < n_; q++) zl[i*k_ + j] += xl[i*n_ + q] * wl[q*k_ + j];
        end
        for (int b = 0; b < m_*k_; b += REDMULE_HCI_PORTS) begin
          logic [REDMULE_HCI_PORTS-1:0] use_l;
          for (int l = 0; l < REDMULE_HCI_PORTS; l++) begin
            use_l[l] = (b + l < m_*k_); ad[l] = rm_cfg.z_ptr + 4*(b + l);
            wd[l] = use_l[l] ? zl[b + l] : '0;
          end
          rm_burst(ad, use_l, 1'b1, wd, rd);
        end
        rm_done = 1; @(negedge clk); rm_done = 0;
      end
    end
  end

  // ---------------- Snitch / Spatz model ----------------
  // Tasks read their parameter block {a, b, c, m, n, k} through the Snitch
  // port and stream vectors over the four vector ports, four elements a step.
  task automatic sp_vload(logic [31:0] base, int idx, int cnt, output logic [31:0] v [4]);
    logic [31:0] ad [SPATZ_HCI_PORTS], wd [SPATZ_HCI_PORTS], rd [SPATZ_HCI_PORTS];
    logic [SPATZ_HCI_PORTS-1:0] use_l;
    for (int l = 0; l < SPATZ_HCI_PORTS; l++) begin
      use_l[l] = (l < 4) && (l < cnt); ad[l] = base + 4*(idx + l); wd[l] = '0;
    end
    sp_burst(ad, use_l, 1'b0, wd, rd);
    for (int l = 0; l < 4; l++) v[l] = use_l[l] ? rd[l] : '0;
  endtask
  task automatic sp_vstore(logic [31:0] base, int idx, int cnt, input logic [31:0] v [4]);
    logic [31:0] ad [SPATZ_HCI_PORTS], wd [SPATZ_HCI_PORTS], rd [SPATZ_HCI_PORTS];
    logic [SPATZ_HCI_PORTS-1:0] use_l;
    for (int l = 0; l < SPATZ_HCI_PORTS; l++) begin
      use_l[l] = (l < 4) && (l < cnt); ad[l] = base + 4*(idx + l); wd[l] = (l < 4) ? v[l] : '0;
    end
    sp_burst(ad, use_l, 1'b1, wd, rd);
  endtask
  task automatic sp_sload(logic [31:0] a, output logic [31:0] d);
    logic [31:0] ad [SPATZ_HCI_PORTS], wd [SPATZ_HCI_PORTS], rd [SPATZ_HCI_PORTS];
    for (int l = 0; l < SPATZ_HCI_PORTS; l++) begin ad[l] = a; wd[l] = '0; end
    sp_burst(ad, 5'b10000, 1'b0, wd, rd);
    d = rd[4];
  endtask
  task automatic sp_sstore(logic [31:0] a, logic [31:0] d);
    logic [31:0] ad [SPATZ_HCI_PORTS], wd [SPATZ_HCI_PORTS], rd [SPATZ_HCI_PORTS];
    for (int l = 0; l < SPATZ_HCI_PORTS; l++) begin ad[l] = a; wd[l] = d; end
    sp_burst(ad, 5'b10000, 1'b1, wd, rd);
  endtask

  initial begin
    logic [31:0] w0, w1, w2, t0, t1, pc, d; logic e;
    sp_obi_req = '0; rom_req = '0;
    for (int l = 0; l < SPATZ_HCI_PORTS; l++) sp_tcdm_req[l] = '0;
    wait (rst_n);
    @(posedge spatz_clk);
    rom_acc(SPATZ_BOOT_ADDR + 0, 1'b0, '0, w0, e);
    rom_acc(SPATZ_BOOT_ADDR + 4, 1'b0, '0, w1, e);
    rom_acc(SPATZ_BOOT_ADDR + 8, 1'b0, '0, w2, e);
    t0 = {w0[31:12], 12'd0};
    sp_rd(t0 + {{20{w1[31]}}, w1[31:20]}, t1);
    pc = t1 + {{20{w2[31]}}, w2[31:20]};
    chk("Spatz boots into the runtime", pc, RUNTIME);
    sp_wr(SPATZ_BASE + 32'h04, 32'h1);
    forever begin
      logic [31:0] p [6], va [4], vb [4], vc [4];
      wait (spatz_irq);
      sp_rd(SPATZ_BASE + 32'h0C, pc);
      sp_wr(SPATZ_BASE + 32'h08, 32'h0);
      sp_rd(SPATZ_BASE + 32'h10, d);
      for (int i = 0; i < 6; i++) sp_sload(d + 4*i, p[i]);
      case (pc)
        T_VSUM:
          for (int i = 0; i < int'(p[4]); i += 4) begin
            sp_vload(p[0], i, int'(p[4]) - i, va);
            sp_vload(p[1], i, int'(p[4]) - i, vb);
            for (int l = 0; l < 4; l++) vc[l] = va[l] + vb[l];
            sp_vstore(p[2], i, int'(p[4]) - i, vc);
          end
        T_DOTP: begin
          logic [31:0] acc [4];
          for (int l = 0; l < 4; l++) acc[l] = '0;
          for (int i = 0; i < int'(p[4]); i += 4) begin
            sp_vload(p[0], i, int'(p[4]) - i, va);
            sp_vload(p[1], i, int'(p[4]) - i, vb);
            for (int l = 0; l < 4; l++) acc[l] += va[l] * vb[l];
          end
          sp_sstore(p[2], acc[0] + acc[1] + acc[2] + acc[3]);
        end
        T_MATVEC:   // c[i] = sum_j a[i*n + j] * b[j], n x n
          for (int i = 0; i < int'(p[4]); i++) begin
            logic [31:0] acc [4];
            for (int l = 0; l < 4; l++) acc[l] = '0;
            for (int j = 0; j < int'(p[4]); j += 4) begin
              sp_vload(p[0], i*int'(p[4]) + j, int'(p[4]) - j, va);
              sp_vload(p[1], j, int'(p[4]) - j, vb);
              for (int l = 0; l < 4; l++) acc[l] += va[l] * vb[l];
            end
            sp_sstore(p[2] + 4*i, acc[0] + acc[1] + acc[2] + acc[3]);
          end
        T_MATMUL: begin   // c[i*k + j] = sum_q a[i*n + q] * b[q*k + j]
          int m_, n_, k_;
          m_ = int'(p[3]); n_ = int'(p[4]); k_ = int'(p[5]);
          for (int i = 0; i < m_; i++)
            for (int j = 0; j < k_; j += 4) begin
              for (int l = 0; l < 4; l++) vc[l] = '0;
              for (int q = 0; q < n_; q++) begin
                logic [31:0] s;
                sp_sload(p[0] + 4*(i*n_ + q), s);
                sp_vload(p[1], q*k_ + j, k_ - j, vb);
                for (int l = 0; l < 4; l++) vc[l] += s * vb[l];
              end
              sp_vstore(p[2], i*k_ + j, k_ - j, vc);
            end
        end
        default: chk("known task", pc, T_VSUM);
      endcase
      sp_wr(SPATZ_BASE + 32'h14, 32'h0);
      sp_wr(SPATZ_BASE + 32'h18, 32'h1);
    end
  end

  // ---------------- control-core program ----------------
  task automatic dma(int ch, logic [31:0] dst, logic [31:0] src, int words);
    logic [31:0] base, d, id;
    base = (ch == 0) ? IDMA_A2O_BASE : IDMA_O2A_BASE;
    core_wr(base + 32'hD0, dst);
    core_wr(base + 32'hD8, src);
    core_wr(base + 32'hE0, 4 * words);
    core_rd(base + 32'h44, id);
    do core_rd(EU_BASE + EU_CORE_EVENT_WAIT_CLEAR, d);
    while (!d[(ch == 0) ? EVT_IDMA_A2O_DONE : EVT_IDMA_O2A_DONE]);
    core_rd(base + 32'h84, d);
    chk("DMA done id", d, id);
  endtask

  task automatic wait_evt(int bitn);
    logic [31:0] d;
    do core_rd(EU_BASE + EU_CORE_EVENT_WAIT_CLEAR, d); while (!d[bitn]);
  endtask

  int jobno = 0;
  // one kernel: c = a (m x n) * b (n x k) on RedMulE, or a Spatz task
  task automatic run(string name, bit on_spatz, logic [31:0] task_pc, int m, int n, int k,
                     int a_words, int b_words, int c_words);
    logic [31:0] d, c_l2;
    int t_start, t_end;
    c_l2 = L2_C + 32'h0010_0000 * jobno;
    jobno++;
    dma(0, L1_A, L2_A, a_words);
    dma(0, L1_B, L2_B, b_words);
    t_start = cyc;
    if (!on_spatz) begin
      do core_rd(REDMULE_BASE + 32'h04, d); while (d != 0);
      core_wr(REDMULE_BASE + 32'h08, 32'h1);
      core_wr(REDMULE_BASE + 32'h40, L1_A); core_wr(REDMULE_BASE + 32'h44, L1_B);
      core_wr(REDMULE_BASE + 32'h48, L1_C);
      core_wr(REDMULE_BASE + 32'h4C, (m << 16) | k); core_wr(REDMULE_BASE + 32'h50, n);
      core_wr(REDMULE_BASE + 32'h00, 32'h1);
      wait_evt(EVT_REDMULE_DONE);
    end else begin
      core_wr(PARAM_ADDR + 0, L1_A); core_wr(PARAM_ADDR + 4, L1_B); core_wr(PARAM_ADDR + 8, L1_C);
      core_wr(PARAM_ADDR + 12, m); core_wr(PARAM_ADDR + 16, n); core_wr(PARAM_ADDR + 20, k);
      core_wr(SPATZ_BASE + 32'h0C, task_pc);
      core_wr(SPATZ_BASE + 32'h10, PARAM_ADDR);
      core_wr(SPATZ_BASE + 32'h08, 32'h1);
      wait_evt(EVT_SPATZ_DONE);
      core_rd(SPATZ_BASE + 32'h14, d); chk("Spatz exit code", d, 0);
    end
    t_end = cyc;
    dma(1, c_l2, L1_C, c_words);
    // reference from the L2 operands
    begin
      int errs; errs = 0;
      for (int i = 0; i < c_words; i++) begin
        logic [31:0] exp;
        exp = '0;
        if (on_spatz && task_pc == T_VSUM) exp = l2_init(L2_A + 4*i) + l2_init(L2_B + 4*i);
        else begin
          int r, cc; r = i / k; cc = i % k;
          for (int q = 0; q < n; q++) exp += l2_init(L2_A + 4*(r*n + q)) * l2_init(L2_B + 4*(q*k + cc));
        end
        checks++;
        if (!l2mem.exists(c_l2 + 4*i) || l2mem[c_l2 + 4*i] !== exp) begin
          errs++; failures++;
          if (errs < 4) $display("FAIL %s result %0d: got %h expected %h", name, i,
                                 l2mem.exists(c_l2 + 4*i) ? l2mem[c_l2 + 4*i] : 32'hxxxx_xxxx, exp);
        end
      end
    end
    $display("INFO %-8s %-7s M=%0d N=%0d K=%0d engine cycles %0d", name, on_spatz ? "Spatz" : "RedMulE", m, n, k, t_end - t_start);
  endtask

  initial begin
    logic [31:0] d;
    int mk [8] = '{1, 2, 4, 8, 16, 32, 64, 96};
    int mv [4] = '{64, 96, 128, 256};
    int dp [8] = '{16, 32, 64, 128, 256, 512, 1024, 2048};
    int vs [6] = '{16, 32, 64, 128, 256, 512};
    core_req = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    core_wr(EU_BASE + EU_CORE_MASK, (1 << EVT_SPATZ_DONE) | (1 << EVT_REDMULE_DONE) |
            (1 << EVT_IDMA_A2O_DONE) | (1 << EVT_IDMA_O2A_DONE));
    core_wr(SPATZ_BASE + 32'h0C, RUNTIME);
    core_wr(SPATZ_BASE + 32'h00, 32'h1);
    do core_rd(SPATZ_BASE + 32'h04, d); while (d != 1);

    foreach (mk[i]) run("matmul", 1'b0, '0, mk[i], 96, mk[i], mk[i]*96, 96*mk[i], mk[i]*mk[i]);
    foreach (mv[i]) run("matvec", 1'b0, '0, mv[i], mv[i], 1, mv[i]*mv[i], mv[i], mv[i]);
    foreach (dp[i]) run("dotp", 1'b0, '0, 1, dp[i], 1, dp[i], dp[i], 1);
    foreach (mk[i]) run("matmul", 1'b1, T_MATMUL, mk[i], 96, mk[i], mk[i]*96, 96*mk[i], mk[i]*mk[i]);
    foreach (mv[i]) run("matvec", 1'b1, T_MATVEC, mv[i], mv[i], 1, mv[i]*mv[i], mv[i], mv[i]);
    foreach (dp[i]) run("dotp", 1'b1, T_DOTP, 1, dp[i], 1, dp[i], dp[i], 1);
    foreach (vs[i]) run("vsum", 1'b1, T_VSUM, 1, vs[i], 1, vs[i], vs[i], vs[i]);

    $display("INFO %0d kernels, %0d cycles", jobno, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
