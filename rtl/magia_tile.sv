// magia_tile: one compute tile of the MAGIA mesh, in its updated form with a
// memory-mapped control plane and the Spatz vector core complex attached.
//
// What is inside:
//  * 1 MiB L1 (tcdm): 32 word-interleaved 32 KiB banks behind the HCI, with 24
//    32-bit master ports: 0 = OBI crossbar, 1-5 = Spatz CC (4 vector FPU ports +
//    1 Snitch port), 6-21 = the 512-bit RedMulE port as 16 lanes, 22-23 = the
//    two iDMA channels.
//  * obi_xbar with masters control core (through core_data_demux_eu_direct),
//    external AXI side, Snitch; slaves L1, RedMulE, iDMA, FractalSync, Event
//    Unit, Spatz control, L2/AXI side.
//  * Memory-mapped control: redmule_ctrl_regs (0x100), idma_obi_ctrl_decoder +
//    two idma_ctrl_mm (0x200 / 0x400), obi_slave_fsync (0x600), event_unit
//    (0x700, plus the direct link from the demux), spatz_ctrl_regs (0x1700).
//  * Two clock gates: the core clock (enabled by the Event Unit, off while the
//    core sleeps in an event wait) and the Spatz CC clock (SPATZ_CLK_EN).
//  * spatz_bootrom, reached by the Spatz instruction fetch path.
// What is outside, reached through ports: the CV32E40P core (data port, gated
// clock, interrupt), Snitch/Spatz (OBI master, TCDM ports, gated clock,
// interrupt, boot ROM fetch port), the RedMulE engine (TCDM lanes, job
// configuration, start, done/event), the iDMA back ends (job descriptors,
// done/error, TCDM ports), the FractalSync network and the AXI side (external
// master into the crossbar, L2 slave port out of it). All ports use the
// magia_pkg OBI structs; timing is that of the blocks: grants in the request
// cycle, answers one cycle later (L2 port: whenever the AXI side answers, in
// order).
module magia_tile
  import magia_pkg::*;
#(
  parameter int unsigned NBANKS     = magia_pkg::N_BANKS,
  parameter int unsigned NWORDS     = magia_pkg::BANK_WORDS,
  parameter int unsigned SPATZ_PORTS   = magia_pkg::SPATZ_HCI_PORTS,
  parameter int unsigned REDMULE_PORTS = magia_pkg::REDMULE_HCI_PORTS
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         test_en_i,
  input  logic [7:0]   tile_id_i,
  // control core
  output logic         core_clk_o,
  input  obi_req_t     core_data_req_i,
  output obi_rsp_t     core_data_rsp_o,
  output logic         core_irq_o,
  // AXI side of the tile
  input  obi_req_t     ext_req_i,
  output obi_rsp_t     ext_rsp_o,
  output obi_req_t     l2_req_o,
  input  obi_rsp_t     l2_rsp_i,
  // Spatz CC
  output logic         spatz_clk_o,
  output logic         spatz_irq_o,
  input  obi_req_t     spatz_obi_req_i,
  output obi_rsp_t     spatz_obi_rsp_o,
  input  obi_req_t     spatz_tcdm_req_i [SPATZ_PORTS],
  output obi_rsp_t     spatz_tcdm_rsp_o [SPATZ_PORTS],
  input  obi_req_t     spatz_rom_req_i,
  output obi_rsp_t     spatz_rom_rsp_o,
  // RedMulE engine
  input  obi_req_t     redmule_tcdm_req_i [REDMULE_PORTS],
  output obi_rsp_t     redmule_tcdm_rsp_o [REDMULE_PORTS],
  output redmule_cfg_t redmule_cfg_o,
  output logic         redmule_start_o,
  output logic         redmule_soft_clear_o,
  input  logic         redmule_done_i,
  input  logic         redmule_evt_i,
  // iDMA back ends: [0] AXI-to-OBI (L2->L1), [1] OBI-to-AXI (L1->L2)
  output idma_job_t    idma_job_o       [2],
  output logic         idma_job_valid_o [2],
  input  logic         idma_job_ready_i [2],
  input  logic         idma_done_i      [2],
  input  logic         idma_error_i     [2],
  input  obi_req_t     idma_tcdm_req_i  [2],
  output obi_rsp_t     idma_tcdm_rsp_o  [2],
  // FractalSync network
  output logic         fsync_req_o,
  output logic [31:0]  fsync_aggr_o,
  output logic [31:0]  fsync_id_o,
  input  logic         fsync_done_i,
  input  logic         fsync_error_i
);
  localparam int unsigned NM_HCI = 1 + SPATZ_PORTS + REDMULE_PORTS + 2;
  localparam int unsigned P_SPATZ = 1;
  localparam int unsigned P_RM    = 1 + SPATZ_PORTS;
  localparam int unsigned P_DMA   = 1 + SPATZ_PORTS + REDMULE_PORTS;

  // ---------------- core data path ----------------
  obi_req_t    core_x_req;
  obi_rsp_t    core_x_rsp;
  logic        dl_req, dl_wen, dl_gnt, dl_rvalid;
  logic [31:0] dl_add, dl_wdata, dl_rdata;
  logic [3:0]  dl_be;
  logic        core_clk_en;

  core_data_demux_eu_direct i_demux (
    .clk_i, .rst_ni,
    .core_req_i(core_data_req_i), .core_rsp_o(core_data_rsp_o),
    .xbar_req_o(core_x_req), .xbar_rsp_i(core_x_rsp),
    .dl_req_o(dl_req), .dl_add_o(dl_add), .dl_wen_o(dl_wen), .dl_wdata_o(dl_wdata),
    .dl_be_o(dl_be), .dl_gnt_i(dl_gnt), .dl_r_valid_i(dl_rvalid), .dl_r_rdata_i(dl_rdata)
  );

  // ---------------- OBI crossbar ----------------
  obi_req_t xm_req [3];
  obi_rsp_t xm_rsp [3];
  obi_req_t xs_req [7];
  obi_rsp_t xs_rsp [7];

  assign xm_req[0] = core_x_req;
  assign xm_req[1] = ext_req_i;
  assign xm_req[2] = spatz_obi_req_i;
  assign core_x_rsp      = xm_rsp[0];
  assign ext_rsp_o       = xm_rsp[1];
  assign spatz_obi_rsp_o = xm_rsp[2];

  obi_xbar #(.NM(3)) i_xbar (
    .clk_i, .rst_ni, .tile_id_i,
    .mst_req_i(xm_req), .mst_rsp_o(xm_rsp), .slv_req_o(xs_req), .slv_rsp_i(xs_rsp)
  );

  assign l2_req_o  = xs_req[6];
  assign xs_rsp[6] = l2_rsp_i;

  // ---------------- L1: TCDM behind the HCI ----------------
  obi_req_t hci_req [NM_HCI];
  obi_rsp_t hci_rsp [NM_HCI];

  assign hci_req[0] = xs_req[0];
  assign xs_rsp[0]  = hci_rsp[0];
  for (genvar i = 0; i < SPATZ_PORTS; i++) begin : g_sp
    assign hci_req[P_SPATZ+i] = spatz_tcdm_req_i[i];
    assign spatz_tcdm_rsp_o[i] = hci_rsp[P_SPATZ+i];
  end
  for (genvar i = 0; i < REDMULE_PORTS; i++) begin : g_rm
    assign hci_req[P_RM+i] = redmule_tcdm_req_i[i];
    assign redmule_tcdm_rsp_o[i] = hci_rsp[P_RM+i];
  end
  for (genvar i = 0; i < 2; i++) begin : g_dm
    assign hci_req[P_DMA+i] = idma_tcdm_req_i[i];
    assign idma_tcdm_rsp_o[i] = hci_rsp[P_DMA+i];
  end

  tcdm #(.NM(NM_HCI), .NB(NBANKS), .WORDS(NWORDS)) i_tcdm (
    .clk_i, .rst_ni, .mst_req_i(hci_req), .mst_rsp_o(hci_rsp)
  );

  // ---------------- RedMulE control ----------------
  logic [2:0] redmule_evt;
  redmule_ctrl_regs i_redmule_ctrl (
    .clk_i, .rst_ni, .req_i(xs_req[1]), .rsp_o(xs_rsp[1]),
    .cfg_o(redmule_cfg_o), .start_o(redmule_start_o), .soft_clear_o(redmule_soft_clear_o),
    .done_i(redmule_done_i), .engine_evt_i(redmule_evt_i), .evt_o(redmule_evt)
  );

  // ---------------- iDMA control ----------------
  obi_req_t dma_req [2];
  obi_rsp_t dma_rsp [2];
  logic dma_busy [2], dma_start [2], dma_done [2], dma_err [2];

  idma_obi_ctrl_decoder i_idma_dec (
    .req_i(xs_req[2]), .rsp_o(xs_rsp[2]), .ch_req_o(dma_req), .ch_rsp_i(dma_rsp)
  );
  for (genvar c = 0; c < 2; c++) begin : g_dma
    idma_ctrl_mm i_idma_ctrl (
      .clk_i, .rst_ni, .req_i(dma_req[c]), .rsp_o(dma_rsp[c]),
      .job_o(idma_job_o[c]), .job_valid_o(idma_job_valid_o[c]), .job_ready_i(idma_job_ready_i[c]),
      .done_i(idma_done_i[c]), .error_i(idma_error_i[c]),
      .irq_busy_o(dma_busy[c]), .irq_start_o(dma_start[c]),
      .irq_done_o(dma_done[c]), .irq_error_o(dma_err[c])
    );
  end

  // ---------------- FractalSync control ----------------
  logic fs_done, fs_err;
  obi_slave_fsync i_fsync (
    .clk_i, .rst_ni, .req_i(xs_req[3]), .rsp_o(xs_rsp[3]),
    .sync_req_o(fsync_req_o), .aggr_o(fsync_aggr_o), .id_o(fsync_id_o),
    .done_i(fsync_done_i), .error_i(fsync_error_i), .done_o(fs_done), .error_o(fs_err)
  );

  // ---------------- Spatz CC control ----------------
  logic spatz_clk_en, spatz_start, spatz_done;
  spatz_ctrl_regs i_spatz_ctrl (
    .clk_i, .rst_ni, .req_i(xs_req[5]), .rsp_o(xs_rsp[5]),
    .clk_en_o(spatz_clk_en), .irq_o(spatz_irq_o), .start_o(spatz_start), .done_o(spatz_done)
  );

  spatz_bootrom i_bootrom (
    .clk_i, .rst_ni, .req_i(spatz_rom_req_i), .rsp_o(spatz_rom_rsp_o)
  );

  // ---------------- Event Unit ----------------
  logic [31:0] evt;
  always_comb begin
    evt = '0;
    evt[EVT_IDMA_A2O_DONE]  = dma_done[0];
    evt[EVT_IDMA_O2A_DONE]  = dma_done[1];
    evt[EVT_SPATZ_DONE]     = spatz_done;
    evt[EVT_REDMULE_BUSY]   = redmule_evt[0];
    evt[EVT_REDMULE_DONE]   = redmule_evt[1];
    evt[EVT_REDMULE_EVT]    = redmule_evt[2];
    evt[EVT_SPATZ_START]    = spatz_start;
    evt[EVT_FSYNC_DONE]     = fs_done;
    evt[EVT_FSYNC_ERROR]    = fs_err;
    evt[EVT_IDMA_A2O_ERROR] = dma_err[0];
    evt[EVT_IDMA_O2A_ERROR] = dma_err[1];
    evt[EVT_IDMA_A2O_START] = dma_start[0];
    evt[EVT_IDMA_O2A_START] = dma_start[1];
    evt[EVT_IDMA_A2O_BUSY]  = dma_busy[0];
    evt[EVT_IDMA_O2A_BUSY]  = dma_busy[1];
  end

  event_unit i_eu (
    .clk_i, .rst_ni, .evt_i(evt),
    .periph_req_i(xs_req[4]), .periph_rsp_o(xs_rsp[4]),
    .dl_req_i(dl_req), .dl_add_i(dl_add), .dl_wen_i(dl_wen), .dl_wdata_i(dl_wdata),
    .dl_be_i(dl_be), .dl_gnt_o(dl_gnt), .dl_r_valid_o(dl_rvalid), .dl_r_rdata_o(dl_rdata),
    .core_clock_en_o(core_clk_en), .irq_o(core_irq_o)
  );

  // ---------------- clock gates ----------------
  clk_gate i_core_cg  (.clk_i, .en_i(core_clk_en),  .test_en_i, .clk_o(core_clk_o));
  clk_gate i_spatz_cg (.clk_i, .en_i(spatz_clk_en), .test_en_i, .clk_o(spatz_clk_o));
endmodule
