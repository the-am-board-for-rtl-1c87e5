// lamb -- Local Associative Memory Bank: INDIs, four AM chip chains, GLUE.
//
// The six layer hit buses enter the LAMB and are spread to all its AM chips
// by twelve INDI fan-out chips: one per layer and half of the board, each
// half being two chains. The chips form N_CHAINS pipelines of CHIPS chips;
// chip 0 is the far end of a chain and chip CHIPS-1 feeds the GLUE. Each
// chip passes the roads of the chips before it on to the next one, together
// with its own. The wired_DA outputs of a chain are ORed into the chain's
// GLUEwired_DA. The GLUE merges the four chains into the LAMB road bus and
// sends each chain its OPCODEs, all chips of a chain receiving them in
// parallel.
//
// Chip numbering: the chip of chain c at position k has road-address prefix
// LAMB_ID*N_CHAINS*CHIPS + c*CHIPS + k and pattern-load select c*CHIPS + k.
//
// Latency from hit_i to the chip's hit register: two cycles (INDI register,
// chip input register).
//
// Chain organisation, INDI count, GLUE and wired-OR follow the board
// description. CHIPS defaults to 4: the SVT configuration fills only the 16
// top-face sockets of the 32 on the LAMB.
module lamb
  import am_pkg::*;
#(
  parameter int unsigned LAMB_ID = 0,
  parameter int unsigned CHIPS   = 4,
  parameter int unsigned NPATT   = 4096,
  parameter int unsigned PAT_W   = (NPATT > 1) ? $clog2(NPATT) : 1,
  parameter int unsigned N_WAIT  = 8,
  parameter int unsigned SEL_W   = $clog2(N_CHAINS * CHIPS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  layer_hit_t [N_LAYERS-1:0]     hit_i,
  input  logic [OPC_W-1:0]              opc_i,
  input  logic [3:0]                    cfg_thr_i,
  input  logic [1:0]                    cfg_req_i,
  input  logic                          pat_we_i,
  input  logic [SEL_W-1:0]              pat_chip_i,
  input  logic [PAT_W-1:0]              pat_addr_i,
  input  logic [N_LAYERS-1:0][SS_W-1:0] pat_ss_i,
  output word_t                         road_data_o,
  output logic                          road_da_o,
  input  logic                          road_sa_i,
  output logic                          road_end_o
);

  localparam int unsigned HALF = N_CHAINS / 2;

  // INDI outputs: [layer][half][chip within the half]
  layer_hit_t [HALF*CHIPS-1:0] indi_o [N_LAYERS][2];

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    for (genvar h = 0; h < 2; h++) begin : g_half
      indi #(.FANOUT(HALF*CHIPS)) u_indi (
        .clk   (clk),
        .rst_n (rst_n),
        .hit_i (hit_i[l]),
        .hit_o (indi_o[l][h])
      );
    end
  end

  word_t [N_CHAINS-1:0]           ch_data;
  logic  [N_CHAINS-1:0]           ch_da, ch_sa, ch_wda;
  logic  [N_CHAINS-1:0][OPC_W-1:0] ch_opc;

  for (genvar c = 0; c < N_CHAINS; c++) begin : g_chain
    word_t [CHIPS:0]   d;       // d[k] enters chip k, d[CHIPS] goes to the GLUE
    logic  [CHIPS:0]   da, sa;
    logic  [CHIPS-1:0] wda;
    assign d[0]  = '0;
    assign da[0] = 1'b0;
    assign ch_data[c]  = d[CHIPS];
    assign ch_da[c]    = da[CHIPS];
    assign sa[CHIPS]   = ch_sa[c];
    assign ch_wda[c]   = |wda;
    for (genvar k = 0; k < CHIPS; k++) begin : g_chip
      layer_hit_t [N_LAYERS-1:0] hits;
      for (genvar l = 0; l < N_LAYERS; l++) begin : g_l
        assign hits[l] = indi_o[l][c / HALF][(c % HALF) * CHIPS + k];
      end
      amchip #(
        .NPATT   (NPATT),
        .PAT_W   (PAT_W),
        .CHIP_ID (LAMB_ID * N_CHAINS * CHIPS + c * CHIPS + k)
      ) u_chip (
        .clk        (clk),
        .rst_n      (rst_n),
        .hit_i      (hits),
        .opc_i      (ch_opc[c]),
        .cfg_thr_i  (cfg_thr_i),
        .cfg_req_i  (cfg_req_i),
        .pat_we_i   (pat_we_i && (int'(pat_chip_i) == c * CHIPS + k)),
        .pat_addr_i (pat_addr_i),
        .pat_ss_i   (pat_ss_i),
        .up_data_i  (d[k]),
        .up_da_i    (da[k]),
        .up_sa_o    (sa[k]),
        .dn_data_o  (d[k+1]),
        .dn_da_o    (da[k+1]),
        .dn_sa_i    (sa[k+1]),
        .wired_da_o (wda[k])
      );
    end
  end

  // Nothing feeds the far end of a chain, so its input buffer always has room.
  for (genvar c = 0; c < N_CHAINS; c++) begin : g_far
    a_far_end_sa: assert property (@(posedge clk) disable iff (!rst_n) g_chain[c].sa[0]);
  end

  glue #(.N_WAIT(N_WAIT)) u_glue (
    .clk          (clk),
    .rst_n        (rst_n),
    .chain_data_i (ch_data),
    .chain_da_i   (ch_da),
    .chain_sa_o   (ch_sa),
    .chain_wda_i  (ch_wda),
    .chain_opc_o  (ch_opc),
    .opc_i        (opc_i),
    .road_data_o  (road_data_o),
    .road_da_o    (road_da_o),
    .road_sa_i    (road_sa_i),
    .road_end_o   (road_end_o)
  );

endmodule
