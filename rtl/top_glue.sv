// top_glue -- the TOP GLUE chip: AM++ road output and OPCODE distribution.
//
// OPCODEs: strobed by the sequencer (AMS), the TOP GLUE broadcasts OPCODE
// words to the four LAMB GLUEs. init_i sends OP_INIT, which resets the
// event's match state and loads the default criterion. eoh_i (End-of-Hit)
// sends OP_DEC_THR followed by the DATA word cfg_thr_dec_i; the LAMB GLUEs
// apply it chain by chain once the roads of the current criterion are out.
// With default THR 6 and cfg_thr_dec_i = 5 roads come out ordered (all 5/5
// roads, then the 4/5 ones); with default THR 7 nothing matches before
// End-of-Hit and all roads come out together after it.
//
// Roads: the four LAMB road buses are merged by road_merge into the single
// bus to the P3 connector. As in the LAMB GLUE, a LAMB that has already
// finished the oldest criterion (its Road_end came) is held until all four
// have, so criteria do not mix across LAMBs. When all four LAMBs have sent
// Road_end for a criterion and the road path is empty, road_end_o pulses;
// the pulse for the last OPCODE sent after End-of-Hit also pulses
// event_done_o.
//
// Road test mode: with test_road_i high the LAMB road buses are ignored and road
// packets written from VME take their place, so the road path to P3 can be
// checked on its own. VME writes two words per packet (Road-ADD, then
// bitmap) with vme_road_we_i while vme_road_rdy_o is high; the packet is then
// sent to P3 like any other.
//
// Interface: init_i and eoh_i are one-cycle strobes; init_i may come only
// when the previous event is done, and eoh_i only after init_i. OPCODE words
// leave through an output register (OP_NOP when idle).
//
// Merging, OPCODE distribution and Road_end follow the board description;
// the strobes, event_done_o, the counters and the VME write protocol of the
// test-mode road source are this design's choices.
module top_glue
  import am_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // sequencer control
  input  logic                    init_i,
  input  logic                    eoh_i,
  input  logic [3:0]              cfg_thr_dec_i,
  // VME test-mode road source
  input  logic                    test_road_i,
  input  logic                    vme_road_we_i,
  input  word_t                   vme_road_i,
  output logic                    vme_road_rdy_o,
  // OPCODE broadcast to the LAMBs
  output logic [OPC_W-1:0]        opc_o,
  // LAMB road buses
  input  word_t [N_LAMBS-1:0]     lamb_data_i,
  input  logic  [N_LAMBS-1:0]     lamb_da_i,
  output logic  [N_LAMBS-1:0]     lamb_sa_o,
  input  logic  [N_LAMBS-1:0]     lamb_end_i,
  // road bus to the P3 connector
  output word_t                   road_data_o,
  output logic                    road_da_o,
  input  logic                    road_sa_i,
  output logic                    road_end_o,
  output logic                    event_done_o
);

  // ---------------------------------------------------------- OPCODEs
  logic       send_data;
  logic [1:0] outstanding;   // OPCODEs sent and not yet retired
  logic       eoh_seen;

  logic [1:0]         ahead [N_LAMBS];
  logic [N_LAMBS-1:0] allow;
  logic               all_done, path_empty;

  always_comb begin
    all_done = 1'b1;
    for (int k = 0; k < N_LAMBS; k++) begin
      allow[k] = (ahead[k] == 2'd0) && !lamb_end_i[k] && !test_road_i;
      if (ahead[k] == 2'd0) all_done = 1'b0;
    end
  end

  wire retire = all_done && path_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opc_o        <= OP_NOP;
      send_data    <= 1'b0;
      outstanding  <= '0;
      eoh_seen     <= 1'b0;
      ahead        <= '{default: 2'd0};
      road_end_o   <= 1'b0;
      event_done_o <= 1'b0;
    end else begin
      automatic logic [1:0] outs = outstanding;
      opc_o     <= OP_NOP;
      send_data <= 1'b0;
      if (send_data) begin
        opc_o <= cfg_thr_dec_i;
      end else if (init_i) begin
        opc_o    <= OP_INIT;
        eoh_seen <= 1'b0;
        outs     = outs + 2'd1;
      end else if (eoh_i) begin
        opc_o     <= OP_DEC_THR;
        send_data <= 1'b1;
        eoh_seen  <= 1'b1;
        outs      = outs + 2'd1;
      end
      if (retire) outs = outs - 2'd1;
      outstanding <= outs;
      for (int k = 0; k < N_LAMBS; k++)
        ahead[k] <= ahead[k] + 2'(lamb_end_i[k]) - 2'(retire);
      road_end_o   <= retire;
      event_done_o <= retire && eoh_seen && (outs == 2'd0);
    end
  end

  a_strobe: assert property (@(posedge clk) disable iff (!rst_n)
                             !(send_data && (init_i || eoh_i)) && !(init_i && eoh_i));

  // ------------------------------------------------- VME test road source
  typedef enum logic [1:0] {T_EMPTY, T_HAVE1, T_FULL, T_W2} t_state_e;
  t_state_e t_state;
  word_t    t_w1, t_w2;
  logic     t_sa;

  assign vme_road_rdy_o = (t_state == T_EMPTY) || (t_state == T_HAVE1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_state <= T_EMPTY;
      t_w1    <= '0;
      t_w2    <= '0;
    end else begin
      unique case (t_state)
        T_EMPTY: if (vme_road_we_i) begin t_w1 <= vme_road_i; t_state <= T_HAVE1; end
        T_HAVE1: if (vme_road_we_i) begin t_w2 <= vme_road_i; t_state <= T_FULL; end
        T_FULL:  if (t_sa) t_state <= T_W2;
        default: t_state <= T_EMPTY;
      endcase
    end
  end

  // ------------------------------------------------------------- roads
  word_t [N_LAMBS:0] m_data;
  logic  [N_LAMBS:0] m_da, m_sa, m_allow;
  assign m_data  = {(t_state == T_W2) ? t_w2 : t_w1, lamb_data_i};
  assign m_da    = {t_state == T_FULL, lamb_da_i};
  assign m_allow = {test_road_i, allow};
  assign lamb_sa_o = m_sa[N_LAMBS-1:0];
  assign t_sa      = m_sa[N_LAMBS];

  road_merge #(.N(N_LAMBS + 1)) u_merge (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_data_i  (m_data),
    .in_da_i    (m_da),
    .in_sa_o    (m_sa),
    .allow_i    (m_allow),
    .out_data_o (road_data_o),
    .out_da_o   (road_da_o),
    .out_sa_i   (road_sa_i),
    .empty_o    (path_empty)
  );

endmodule
