// pipeline_reg -- board pipeline register in front of a LAMB connector.
//
// Re-times the six layer hit buses and the OPCODE bus on their way from the
// Input Control and TOP GLUE chips to one LAMB, one cycle of latency, with
// a synchronous load and an asynchronous reset to idle (no hit, OP_NOP).
// The register's place follows the board drawing; what it carries is this
// design's choice (the road buses, whose DA/SA handshake is answered within
// the cycle, are not re-timed).
module pipeline_reg
  import am_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  layer_hit_t [N_LAYERS-1:0] hit_i,
  input  logic [OPC_W-1:0]          opc_i,
  output layer_hit_t [N_LAYERS-1:0] hit_o,
  output logic [OPC_W-1:0]          opc_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_o <= '0;
      opc_o <= OP_NOP;
    end else begin
      hit_o <= hit_i;
      opc_o <= opc_i;
    end
  end

endmodule
