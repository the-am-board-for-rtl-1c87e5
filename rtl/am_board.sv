// am_board -- the AM++ associative memory board, top level.
//
// The board finds the roads (coarse trajectories) of an event. Hits arrive
// one at a time on the SVT bus through the P3 connector; the Input Control
// chip splits them into six per-layer buses, which reach each of the four
// LAMBs through a pipeline register. On a LAMB the INDI chips fan the hits
// out to the AM chips, which compare every hit with all their stored
// patterns at once. Matched roads travel down the chip chains to the LAMB
// GLUE, and the TOP GLUE merges the four LAMB outputs onto the P3 road bus
// as (Road-ADD, bitmap) packets.
//
// Per event the sequencer strobes init_i (OP_INIT: clear, default criterion
// cfg_thr_i / cfg_req_i), sends the hits, then strobes eoh_i (End-of-Hit:
// OP_DEC_THR to cfg_thr_dec_i). Hit input and road output use separate
// buses, so roads that pass the default criterion leave while hits are still
// coming in. road_end_o pulses when the roads of one criterion are all out,
// event_done_o with the last one.
//
// Road-ADD: {LAMB, chain, chip, pattern} = 2 + 2 + 2 + 12 bits at the
// default sizes. Patterns are written through a parallel port (pat_*),
// pat_chip_i = {LAMB, chain, chip}; on the real board they are loaded over
// JTAG from VME, which is not modelled. test_mode_i makes the Input Control
// take hits from the VME test port instead of P3; test_road_i makes the TOP
// GLUE send road packets written from VME (vme_road_*) instead of the LAMB
// roads.
//
// Hit latency from P3 to the AM chip hit registers: four cycles (Input
// Control, pipeline register, INDI, chip input). OPCODEs take at least four
// cycles to reach a GLUE FIFO, so End-of-Hit strobed after the last hit
// cannot overtake it.
module am_board
  import am_pkg::*;
#(
  parameter int unsigned CHIPS  = 4,
  parameter int unsigned NPATT  = 4096,
  parameter int unsigned PAT_W  = (NPATT > 1) ? $clog2(NPATT) : 1,
  parameter int unsigned N_WAIT = 8,
  parameter int unsigned LSEL_W = $clog2(N_CHAINS * CHIPS),
  parameter int unsigned SEL_W  = 2 + LSEL_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // P3 hit bus
  input  logic                          p3_valid_i,
  input  logic [LAYER_W-1:0]            p3_layer_i,
  input  logic [SS_W-1:0]               p3_ss_i,
  // sequencer control
  input  logic                          init_i,
  input  logic                          eoh_i,
  input  logic [3:0]                    cfg_thr_i,
  input  logic [1:0]                    cfg_req_i,
  input  logic [3:0]                    cfg_thr_dec_i,
  // VME test mode hit source
  input  logic                          test_mode_i,
  input  logic                          vme_valid_i,
  input  logic [LAYER_W-1:0]            vme_layer_i,
  input  logic [SS_W-1:0]               vme_ss_i,
  // VME test mode road source (TOP GLUE)
  input  logic                          test_road_i,
  input  logic                          vme_road_we_i,
  input  word_t                         vme_road_i,
  output logic                          vme_road_rdy_o,
  // pattern bank loading
  input  logic                          pat_we_i,
  input  logic [SEL_W-1:0]              pat_chip_i,
  input  logic [PAT_W-1:0]              pat_addr_i,
  input  logic [N_LAYERS-1:0][SS_W-1:0] pat_ss_i,
  // P3 road bus
  output word_t                         road_data_o,
  output logic                          road_da_o,
  input  logic                          road_sa_i,
  output logic                          road_end_o,
  output logic                          event_done_o
);

  layer_hit_t [N_LAYERS-1:0] ic_hits;
  logic [OPC_W-1:0]          tg_opc;

  input_control u_ic (
    .clk         (clk),
    .rst_n       (rst_n),
    .p3_valid_i  (p3_valid_i),
    .p3_layer_i  (p3_layer_i),
    .p3_ss_i     (p3_ss_i),
    .test_mode_i (test_mode_i),
    .vme_valid_i (vme_valid_i),
    .vme_layer_i (vme_layer_i),
    .vme_ss_i    (vme_ss_i),
    .hit_o       (ic_hits)
  );

  word_t [N_LAMBS-1:0] l_data;
  logic  [N_LAMBS-1:0] l_da, l_sa, l_end;

  for (genvar b = 0; b < N_LAMBS; b++) begin : g_lamb
    layer_hit_t [N_LAYERS-1:0] hits;
    logic [OPC_W-1:0]          opc;

    pipeline_reg u_preg (
      .clk   (clk),
      .rst_n (rst_n),
      .hit_i (ic_hits),
      .opc_i (tg_opc),
      .hit_o (hits),
      .opc_o (opc)
    );

    lamb #(
      .LAMB_ID (b),
      .CHIPS   (CHIPS),
      .NPATT   (NPATT),
      .PAT_W   (PAT_W),
      .N_WAIT  (N_WAIT),
      .SEL_W   (LSEL_W)
    ) u_lamb (
      .clk         (clk),
      .rst_n       (rst_n),
      .hit_i       (hits),
      .opc_i       (opc),
      .cfg_thr_i   (cfg_thr_i),
      .cfg_req_i   (cfg_req_i),
      .pat_we_i    (pat_we_i && (int'(pat_chip_i[SEL_W-1 -: 2]) == b)),
      .pat_chip_i  (pat_chip_i[LSEL_W-1:0]),
      .pat_addr_i  (pat_addr_i),
      .pat_ss_i    (pat_ss_i),
      .road_data_o (l_data[b]),
      .road_da_o   (l_da[b]),
      .road_sa_i   (l_sa[b]),
      .road_end_o  (l_end[b])
    );
  end

  top_glue u_tg (
    .clk           (clk),
    .rst_n         (rst_n),
    .init_i        (init_i),
    .eoh_i         (eoh_i),
    .cfg_thr_dec_i (cfg_thr_dec_i),
    .test_road_i   (test_road_i),
    .vme_road_we_i (vme_road_we_i),
    .vme_road_i    (vme_road_i),
    .vme_road_rdy_o(vme_road_rdy_o),
    .opc_o         (tg_opc),
    .lamb_data_i   (l_data),
    .lamb_da_i     (l_da),
    .lamb_sa_o     (l_sa),
    .lamb_end_i    (l_end),
    .road_data_o   (road_data_o),
    .road_da_o     (road_da_o),
    .road_sa_i     (road_sa_i),
    .road_end_o    (road_end_o),
    .event_done_o  (event_done_o)
  );

endmodule
