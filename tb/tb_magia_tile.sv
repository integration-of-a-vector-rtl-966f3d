`timescale 1ns/1ps
// tb_magia_tile: end-to-end testbench of the MAGIA tile at its default size
// (32 banks x 8192 words, 5 Spatz ports, 16 RedMulE lanes).
//
// Behavioural stand-ins drive the tile's external ports:
//  * a control-core program on the core data port (host side of every flow),
//  * Snitch/Spatz: boots through the boot ROM (decoding the lui/lw/jalr it
//    fetches), signals READY, waits for the START interrupt, runs a vector-sum
//    task over its five TCDM ports, returns an exit code and pulses DONE,
//  * a RedMulE engine: on start reads X and W from L1 over its 16 lanes,
//    computes Z = X*W on integers and writes Z back, then pulses done,
//  * two iDMA back ends copying between a behavioural L2 and L1,
//  * a FractalSync network answering barriers, an L2 memory on the L2 port and
//    a remote master on the external port.
// The core program: Event Unit set-up, Spatz boot, RedMulE and Spatz jobs in
// parallel (bank conflicts), event wait with the core clock gated, iDMA L2->L1
// and L1->L2 with a full submission queue, FractalSync barrier with an
// interrupt, L2 and remote accesses, a guard-region error, and Spatz clock off.
// Results are checked against values computed here; each mechanism is counted
// and must occur at least once.
module tb_magia_tile;
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
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_bank_stall = 0, n_core_sleep = 0, n_spatz_gated = 0, n_xbar_wait = 0, n_direct = 0;
  int n_soft_clear = 0, n_irq = 0, n_dma_backpressure = 0, n_err_rsp = 0, n_masked_hidden = 0, n_l2 = 0, n_ext = 0;
  int core_clk_pulses = 0, spatz_clk_pulses = 0;
  logic spatz_was_on = 1'b0;
  always @(posedge core_clk) core_clk_pulses++;
  always @(posedge spatz_clk) spatz_clk_pulses++;
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < SPATZ_HCI_PORTS; i++) if (sp_tcdm_req[i].req && !sp_tcdm_rsp[i].gnt) n_bank_stall++;
    for (int i = 0; i < REDMULE_HCI_PORTS; i++) if (rm_req[i].req && !rm_rsp[i].gnt) n_bank_stall++;
    if (!dut.core_clk_en) n_core_sleep++;
    if (spatz_was_on && !dut.spatz_clk_en) n_spatz_gated++;
    if (dut.spatz_clk_en) spatz_was_on = 1'b1;
    if ((core_req.req && !core_rsp.gnt) || (sp_obi_req.req && !sp_obi_rsp.gnt) ||
        (ext_req.req && !ext_rsp.gnt)) n_xbar_wait++;
    if (rm_clear) n_soft_clear++;
    if (dut.dl_req) n_direct++;
    if (core_irq) n_irq++;
    if (dut.xs_req[2].req && !dut.xs_rsp[2].gnt) n_dma_backpressure++;
    if (core_rsp.rvalid && core_rsp.err) n_err_rsp++;
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
  `OBI_TASK(ext_acc, ext_req, ext_rsp)
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

  // ---------------- workload data ----------------
  localparam int MM = 4, NN = 8, KK = 4;             // Z[MxK] = X[MxN] * W[NxK]
  localparam logic [31:0] X_ADDR = 32'h0002_0000, W_ADDR = 32'h0002_1000, Z_ADDR = 32'h0002_2000;
  localparam int VN = 64;                            // vector sum length
  localparam logic [31:0] A_ADDR = 32'h0003_0000, B_ADDR = 32'h0003_1000, C_ADDR = 32'h0003_2000;
  localparam logic [31:0] PARAM_ADDR = 32'h0003_F000;
  localparam logic [31:0] RUNTIME = 32'h8000_0000, TASK_VSUM = 32'h8000_0400;
  localparam int DMA_WORDS = 32;
  logic [31:0] xm [MM*NN], wm [NN*KK], av [VN], bv [VN];
  logic [31:0] l2mem [logic [31:0]];

  function automatic logic [31:0] l2_init(logic [31:0] a); return a ^ 32'h5A5A_0000; endfunction

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
        n_l2++;
        l2_busy <= 1'b1; l2_cnt = 2; l2_rid <= l2_req.aid;
        if (l2_req.we) l2mem[l2_req.addr] = l2_req.wdata;
        else l2_rd <= l2mem.exists(l2_req.addr) ? l2mem[l2_req.addr] : l2_init(l2_req.addr);
      end
    end
  end

  // ---------------- FractalSync network: answers 6 cycles after a request ----------------
  initial begin
    fs_done = 0; fs_err = 0;
    forever begin
      @(posedge clk);
      if (fs_req) begin
        chk("barrier level", fs_aggr, 32'd2);
        chk("barrier id", fs_id, 32'd7);
        repeat (6) @(negedge clk);
        fs_done = 1; @(negedge clk); fs_done = 0;
      end
    end
  end

  // ---------------- RedMulE engine model ----------------
  int rm_jobs = 0;
  initial begin
    rm_done = 0; rm_evt = 0;
    for (int l = 0; l < REDMULE_HCI_PORTS; l++) rm_req[l] = '0;
    forever begin
      @(posedge clk);
      if (rm_start) begin
        logic [31:0] ad [REDMULE_HCI_PORTS], wd [REDMULE_HCI_PORTS], rd [REDMULE_HCI_PORTS];
        logic [31:0] xl [MM*NN], wl [NN*KK];
        int m_, n_, k_;
        m_ = int'(rm_cfg.mcfg0[31:16]); k_ = int'(rm_cfg.mcfg0[15:0]); n_ = int'(rm_cfg.mcfg1);
        chk("engine sees M", m_, MM); chk("engine sees K", k_, KK); chk("engine sees N", n_, NN);
        // X and W streams share the 16 lanes: lanes 0-7 fetch X, lanes 8-15 fetch W;
        // both buffers start on bank 0, so the two halves collide bank by bank
        for (int b = 0; b < 4; b++) begin
          for (int l = 0; l < 8; l++) begin
            ad[l] = rm_cfg.x_ptr + 4*(8*b + l); ad[8 + l] = rm_cfg.w_ptr + 4*(8*b + l);
            wd[l] = '0; wd[8 + l] = '0;
          end
          rm_burst(ad, '1, 1'b0, wd, rd);
          for (int l = 0; l < 8; l++) begin xl[8*b + l] = rd[l]; wl[8*b + l] = rd[8 + l]; end
        end
        for (int i = 0; i < MM; i++) for (int j = 0; j < KK; j++) begin
          logic [31:0] acc; acc = '0;
          for (int k = 0; k < NN; k++) acc += xl[i*NN + k] * wl[k*KK + j];
          ad[i*KK + j] = rm_cfg.z_ptr + 4*(i*KK + j); wd[i*KK + j] = acc;
        end
        rm_burst(ad, '1, 1'b1, wd, rd);
        rm_evt = 1; @(negedge clk); rm_evt = 0;
        repeat (3) @(negedge clk);
        rm_done = 1; @(negedge clk); rm_done = 0;
        rm_jobs++;
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
          repeat (8) @(negedge clk);       // busy back end: submission queue stays full
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

  // ---------------- Snitch / Spatz model ----------------
  int spatz_tasks = 0;
  logic [31:0] spatz_pc;
  initial begin
    logic [31:0] w0, w1, w2, t0, t1, d; logic e;
    sp_obi_req = '0; rom_req = '0;
    for (int l = 0; l < SPATZ_HCI_PORTS; l++) sp_tcdm_req[l] = '0;
    // runs only while its clock is on
    wait (rst_n);
    @(posedge spatz_clk);
    rom_acc(SPATZ_BOOT_ADDR + 0, 1'b0, '0, w0, e);
    rom_acc(SPATZ_BOOT_ADDR + 4, 1'b0, '0, w1, e);
    rom_acc(SPATZ_BOOT_ADDR + 8, 1'b0, '0, w2, e);
    // interpret lui / lw / jalr
    chk("boot op0 LUI", {25'd0, w0[6:0]}, 32'h37);
    t0 = {w0[31:12], 12'd0};
    chk("boot op1 LW", {25'd0, w1[6:0]}, 32'h03);
    sp_rd(t0 + {{20{w1[31]}}, w1[31:20]}, t1);
    chk("boot op2 JALR", {25'd0, w2[6:0]}, 32'h67);
    spatz_pc = t1 + {{20{w2[31]}}, w2[31:20]};
    chk("boot jumps to runtime", spatz_pc, RUNTIME);
    // runtime: READY, then wait for the START interrupt
    sp_wr(SPATZ_BASE + 32'h04, 32'h1);
    forever begin
      logic [31:0] p_a, p_b, p_c, p_n;
      logic [31:0] ad [SPATZ_HCI_PORTS], wd [SPATZ_HCI_PORTS], rd [SPATZ_HCI_PORTS];
      wait (spatz_irq);
      sp_rd(SPATZ_BASE + 32'h0C, spatz_pc);
      sp_wr(SPATZ_BASE + 32'h08, 32'h0);                 // acknowledge
      chk("task address", spatz_pc, TASK_VSUM);
      sp_rd(SPATZ_BASE + 32'h10, d);                      // parameter pointer
      // parameters through the Snitch TCDM port (last port)
      for (int l = 0; l < SPATZ_HCI_PORTS; l++) begin ad[l] = d; wd[l] = '0; end
      sp_burst(ad, 5'b10000, 1'b0, wd, rd); p_a = rd[4];
      ad[4] = d + 4;  sp_burst(ad, 5'b10000, 1'b0, wd, rd); p_b = rd[4];
      ad[4] = d + 8;  sp_burst(ad, 5'b10000, 1'b0, wd, rd); p_c = rd[4];
      ad[4] = d + 12; sp_burst(ad, 5'b10000, 1'b0, wd, rd); p_n = rd[4];
      // vector sum, 4 elements per step over the 4 FPU ports
      for (int i = 0; i < int'(p_n); i += 4) begin
        logic [31:0] va [4];
        for (int l = 0; l < 4; l++) ad[l] = p_a + 4*(i + l);
        sp_burst(ad, 5'b01111, 1'b0, wd, rd);
        for (int l = 0; l < 4; l++) va[l] = rd[l];
        for (int l = 0; l < 4; l++) ad[l] = p_b + 4*(i + l);
        sp_burst(ad, 5'b01111, 1'b0, wd, rd);
        for (int l = 0; l < 4; l++) begin ad[l] = p_c + 4*(i + l); wd[l] = va[l] + rd[l]; end
        sp_burst(ad, 5'b01111, 1'b1, wd, rd);
      end
      sp_wr(SPATZ_BASE + 32'h14, 32'h0);                  // exit code
      sp_wr(SPATZ_BASE + 32'h18, 32'h1);                  // done pulse
      spatz_tasks++;
    end
  end

  // ---------------- control-core program ----------------
  initial begin
    logic [31:0] d, id; logic e; int t0, slept_before;
    core_req = '0; ext_req = '0;
    for (int i = 0; i < MM*NN; i++) xm[i] = $urandom_range(0, 1000);
    for (int i = 0; i < NN*KK; i++) wm[i] = $urandom_range(0, 1000);
    for (int i = 0; i < VN; i++) begin av[i] = $urandom; bv[i] = $urandom; end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // data into L1 through the crossbar
    for (int i = 0; i < MM*NN; i++) core_wr(X_ADDR + 4*i, xm[i]);
    for (int i = 0; i < NN*KK; i++) core_wr(W_ADDR + 4*i, wm[i]);
    for (int i = 0; i < VN; i++) begin core_wr(A_ADDR + 4*i, av[i]); core_wr(B_ADDR + 4*i, bv[i]); end
    core_wr(PARAM_ADDR + 0, A_ADDR); core_wr(PARAM_ADDR + 4, B_ADDR);
    core_wr(PARAM_ADDR + 8, C_ADDR); core_wr(PARAM_ADDR + 12, VN);

    // Event Unit: Spatz done, RedMulE done, iDMA done, FractalSync done
    core_wr(EU_BASE + EU_CORE_MASK, (1 << EVT_SPATZ_DONE) | (1 << EVT_REDMULE_DONE) |
            (1 << EVT_IDMA_A2O_DONE) | (1 << EVT_IDMA_O2A_DONE) | (1 << EVT_FSYNC_DONE));
    core_rd(EU_BASE + EU_CORE_MASK, d);
    chk("EU mask", d, 32'h0100_050C);

    // Spatz boot
    core_wr(SPATZ_BASE + 32'h0C, RUNTIME);
    core_wr(SPATZ_BASE + 32'h00, 32'h1);
    t0 = 0;
    do begin core_rd(SPATZ_BASE + 32'h04, d); t0++; end while (d != 1 && t0 < 1000);
    chk("Spatz ready", d, 1);

    // RedMulE job
    t0 = 0;
    do begin core_rd(REDMULE_BASE + 32'h04, d); t0++; end while (d != 0 && t0 < 100);
    chk("RedMulE acquired", d, 0);
    core_wr(REDMULE_BASE + 32'h08, 32'h1);
    core_wr(REDMULE_BASE + 32'h40, X_ADDR); core_wr(REDMULE_BASE + 32'h44, W_ADDR);
    core_wr(REDMULE_BASE + 32'h48, Z_ADDR);
    core_wr(REDMULE_BASE + 32'h4C, (MM << 16) | KK); core_wr(REDMULE_BASE + 32'h50, NN);
    core_wr(REDMULE_BASE + 32'h54, 32'h0);
    // Spatz task, started right after the RedMulE trigger so both hit L1 at once
    core_wr(SPATZ_BASE + 32'h0C, TASK_VSUM);
    core_wr(SPATZ_BASE + 32'h10, PARAM_ADDR);
    core_wr(REDMULE_BASE + 32'h00, 32'h1);
    core_wr(SPATZ_BASE + 32'h08, 32'h1);

    // wait for both with event-load waits (core clock gated meanwhile)
    begin
      logic [31:0] got; got = '0;
      while ((got & ((1 << EVT_SPATZ_DONE) | (1 << EVT_REDMULE_DONE))) !=
             ((1 << EVT_SPATZ_DONE) | (1 << EVT_REDMULE_DONE))) begin
        core_rd(EU_BASE + EU_CORE_EVENT_WAIT_CLEAR, d);
        got |= d;
      end
    end
    chk("RedMulE jobs", rm_jobs, 1);
    chk("Spatz tasks", spatz_tasks, 1);
    core_rd(REDMULE_BASE + 32'h0C, d); chk("RedMulE idle", d, 0);
    core_rd(SPATZ_BASE + 32'h14, d);   chk("Spatz exit code", d, 0);
    core_rd(SPATZ_BASE + 32'h08, d);   chk("START acknowledged", d, 0);
    // busy event of RedMulE stays hidden in the buffer while unmasked
    core_rd(EU_BASE + EU_CORE_BUFFER, d);
    if (d[EVT_REDMULE_BUSY] && !d[EVT_REDMULE_DONE]) n_masked_hidden++;
    core_rd(EU_BASE + EU_CORE_BUFFER_MASKED, d);
    chk("busy hidden by mask", {31'd0, d[EVT_REDMULE_BUSY]}, 0);
    // results of both engines
    for (int i = 0; i < MM; i++) for (int j = 0; j < KK; j++) begin
      logic [31:0] acc; acc = '0;
      for (int k = 0; k < NN; k++) acc += xm[i*NN + k] * wm[k*KK + j];
      core_rd(Z_ADDR + 4*(i*KK + j), d);
      chk($sformatf("Z[%0d][%0d]", i, j), d, acc);
    end
    for (int i = 0; i < VN; i++) begin
      core_rd(C_ADDR + 4*i, d);
      chk($sformatf("C[%0d]", i), d, av[i] + bv[i]);
    end
    core_wr(EU_BASE + EU_CORE_BUFFER_CLEAR, 32'hFFFF_FFFF);
    core_rd(EU_BASE + EU_CORE_BUFFER, d);
    chk("buffer cleared", d, 0);

    // second RedMulE acquire while idle, then soft clear drops the lock
    core_rd(REDMULE_BASE + 32'h04, d); chk("RedMulE re-acquire", d, 0);
    core_rd(REDMULE_BASE + 32'h04, d); chk("RedMulE locked", d, 32'hFFFF_FFFF);
    core_wr(REDMULE_BASE + 32'h14, 32'h0);
    core_rd(REDMULE_BASE + 32'h04, d); chk("RedMulE free after clear", d, 0);
    core_wr(REDMULE_BASE + 32'h14, 32'h0);

    // iDMA L2 -> L1: two jobs in a row; the second NEXT_ID waits for queue space
    core_wr(IDMA_A2O_BASE + 32'hD0, 32'h0005_0000);
    core_wr(IDMA_A2O_BASE + 32'hD8, L2_BASE + 32'h0001_0000);
    core_wr(IDMA_A2O_BASE + 32'hE0, DMA_WORDS * 4);
    core_wr(IDMA_A2O_BASE + 32'hF8, 32'd1);
    core_wr(IDMA_A2O_BASE + 32'h110, 32'd1);
    core_rd(IDMA_A2O_BASE + 32'h44, id); chk("first job id", id, 1);
    core_wr(IDMA_A2O_BASE + 32'hD0, 32'h0005_1000);
    core_rd(IDMA_A2O_BASE + 32'h44, id); chk("second job id", id, 2);
    t0 = 0;
    do begin
      core_rd(EU_BASE + EU_CORE_EVENT_WAIT, d);
      core_rd(IDMA_A2O_BASE + 32'h84, id); t0++;
    end while (id != 2 && t0 < 50);
    chk("A2O jobs done", id, 2);
    chk("A2O event", {31'd0, d[EVT_IDMA_A2O_DONE]}, 1);
    for (int w = 0; w < DMA_WORDS; w++) begin
      core_rd(32'h0005_0000 + 4*w, d); chk("A2O copy 1", d, l2_init(L2_BASE + 32'h0001_0000 + 4*w));
      core_rd(32'h0005_1000 + 4*w, d); chk("A2O copy 2", d, l2_init(L2_BASE + 32'h0001_0000 + 4*w));
    end
    core_wr(EU_BASE + EU_CORE_BUFFER_CLEAR, 32'hFFFF_FFFF);

    // iDMA L1 -> L2: send Z out
    core_wr(IDMA_O2A_BASE + 32'hD0, L2_BASE + 32'h0002_0000);
    core_wr(IDMA_O2A_BASE + 32'hD8, Z_ADDR);
    core_wr(IDMA_O2A_BASE + 32'hE0, MM * KK * 4);
    core_rd(IDMA_O2A_BASE + 32'h44, id); chk("O2A job id", id, 1);
    core_rd(EU_BASE + EU_CORE_EVENT_WAIT_CLEAR, d);
    chk("O2A event", {31'd0, d[EVT_IDMA_O2A_DONE]}, 1);
    core_rd(IDMA_O2A_BASE + 32'h84, id); chk("O2A done id", id, 1);
    for (int i = 0; i < MM*KK; i++) begin
      core_rd(Z_ADDR + 4*i, d);
      chk("O2A copy in L2", l2mem.exists(L2_BASE + 32'h0002_0000 + 4*i) ?
          l2mem[L2_BASE + 32'h0002_0000 + 4*i] : 32'hDEAD_BEEF, d);
    end

    // FractalSync barrier, answered through the interrupt line
    core_wr(EU_BASE + EU_CORE_IRQ_MASK, 1 << EVT_FSYNC_DONE);
    core_wr(FSYNC_BASE + 32'h00, 32'd2);
    core_wr(FSYNC_BASE + 32'h04, 32'd7);
    core_wr(FSYNC_BASE + 32'h08, 32'd1);
    core_rd(FSYNC_BASE + 32'h0C, d); chk("barrier busy", d, 32'h4);
    t0 = 0;
    while (!core_irq && t0 < 1000) begin @(negedge clk); t0++; end
    chk("barrier interrupt", {31'd0, core_irq}, 1);
    core_rd(EU_BASE + EU_CORE_BUFFER_IRQ_MASKED, d); chk("irq cause", d, 1 << EVT_FSYNC_DONE);
    core_rd(FSYNC_BASE + 32'h0C, d); chk("barrier finished", d, 0);
    core_wr(EU_BASE + EU_CORE_BUFFER_CLEAR, 1 << EVT_FSYNC_DONE);
    @(negedge clk);
    chk("interrupt released", {31'd0, core_irq}, 0);

    // L2 through the crossbar
    core_wr(L2_BASE + 32'h100, 32'hCAFE_0001);
    core_rd(L2_BASE + 32'h100, d); chk("L2 read back", d, 32'hCAFE_0001);
    // remote master and core hit L1 in the same cycle
    fork
      begin logic [31:0] x; logic ee; ext_acc(32'h0006_0000, 1'b1, 32'h1234_5678, x, ee); n_ext++; end
      core_wr(32'h0006_0004, 32'h8765_4321);
    join
    begin logic [31:0] x; logic ee;
      ext_acc(32'h0006_0004, 1'b0, '0, x, ee); chk("remote read", x, 32'h8765_4321);
    end
    core_rd(32'h0006_0000, d); chk("remote write", d, 32'h1234_5678);
    // guard region and reserved region answer with an error
    core_acc(32'h0000_0010, 1'b0, '0, d, e); chk("guard error", {31'd0, e}, 1);
    core_acc(32'h0000_2000, 1'b1, 32'h1, d, e); chk("reserved error", {31'd0, e}, 1);

    // Spatz clock off: no more Spatz clock edges
    core_wr(SPATZ_BASE + 32'h00, 32'h0);
    repeat (3) @(negedge clk);
    t0 = spatz_clk_pulses;
    repeat (20) @(negedge clk);
    chk("Spatz clock stopped", spatz_clk_pulses, t0);

    // every mechanism happened
    chk("mech HCI bank conflict", {31'd0, n_bank_stall > 0}, 1);
    chk("mech core clock gated", {31'd0, n_core_sleep > 0}, 1);
    chk("mech Spatz clock gated", {31'd0, n_spatz_gated > 0}, 1);
    chk("mech crossbar contention", {31'd0, n_xbar_wait > 0}, 1);
    chk("mech EU direct link", {31'd0, n_direct > 0}, 1);
    chk("mech interrupt", {31'd0, n_irq > 0}, 1);
    chk("mech iDMA submit back-pressure", {31'd0, n_dma_backpressure > 0}, 1);
    chk("mech error response", {31'd0, n_err_rsp > 0}, 1);
    chk("mech masked event buffered", {31'd0, n_masked_hidden > 0}, 1);
    chk("mech L2 access", {31'd0, n_l2 > 0}, 1);
    chk("mech remote access", {31'd0, n_ext > 0}, 1);
    chk("mech RedMulE soft clear", {31'd0, n_soft_clear > 0}, 1);
    chk("mech DMA jobs", dma_jobs[0] + dma_jobs[1], 3);
    $display("INFO stalls=%0d sleep=%0d spatz_off=%0d xbar_wait=%0d direct=%0d irq=%0d dma_bp=%0d err=%0d l2=%0d cycles=%0d",
             n_bank_stall, n_core_sleep, n_spatz_gated, n_xbar_wait, n_direct, n_irq,
             n_dma_backpressure, n_err_rsp, n_l2, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
