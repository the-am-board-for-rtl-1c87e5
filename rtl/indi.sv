// indi -- Input Distributor: registered fan-out of one layer's hit bus.
//
// The twelve INDI chips of a LAMB spread the six hit buses over the AM chips:
// here each INDI takes one layer bus and drives it, through its own output
// registers, to FANOUT chips (half of the LAMB's chips). One cycle of
// latency. The fan-out role follows the board description; which chips each
// INDI serves and the registered outputs are this design's choices.
module indi
  import am_pkg::*;
#(
  parameter int unsigned FANOUT = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  layer_hit_t              hit_i,
  output layer_hit_t [FANOUT-1:0] hit_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hit_o <= '0;
    else        hit_o <= {FANOUT{hit_i}};
  end

endmodule
