// input_control -- the Input Control chip: serial hit bus to six layer buses.
//
// On the SVT bus the hits of all layers arrive one after another on a single
// bus, each hit carrying its layer number and superstrip address. This block
// registers each hit onto the bus of its layer, so six per-layer buses leave
// it, as the LAMBs expect. A hit whose layer number is not below N_LAYERS is
// dropped. One cycle of latency; at most one layer bus is valid per cycle.
//
// In test mode the hits come from the VME test port instead of the P3
// connector, so that the hit path to the AM chips can be checked from VME.
//
// The demultiplexing and the test-mode source follow the board description;
// the hit format and the one-cycle timing are this design's choices.
module input_control
  import am_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  // P3 connector hit bus
  input  logic                      p3_valid_i,
  input  logic [LAYER_W-1:0]        p3_layer_i,
  input  logic [SS_W-1:0]           p3_ss_i,
  // VME test-mode hit source
  input  logic                      test_mode_i,
  input  logic                      vme_valid_i,
  input  logic [LAYER_W-1:0]        vme_layer_i,
  input  logic [SS_W-1:0]           vme_ss_i,
  // per-layer hit buses to the LAMBs
  output layer_hit_t [N_LAYERS-1:0] hit_o
);

  wire                 v  = test_mode_i ? vme_valid_i : p3_valid_i;
  wire [LAYER_W-1:0]   ly = test_mode_i ? vme_layer_i : p3_layer_i;
  wire [SS_W-1:0]      ss = test_mode_i ? vme_ss_i    : p3_ss_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_o <= '0;
    end else begin
      for (int l = 0; l < N_LAYERS; l++) begin
        hit_o[l].valid <= v && (int'(ly) == l);
        hit_o[l].ss    <= ss;
      end
    end
  end

endmodule
