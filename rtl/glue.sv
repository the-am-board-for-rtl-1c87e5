// glue -- the LAMB GLUE chip: road collection and matching-criterion control.
//
// Road path: the four AM chip chain buses are merged into the single LAMB
// output bus by road_merge (multiplexer, register, two-word FIFO, output
// register), packets kept whole.
//
// OPCODE path: OPCODE words from the TOP GLUE pass an input register and
// enter the three-word Opcode FIFO (OP_NOP words are not stored; the word
// after a two-word OPCODE is its DATA word and is always stored). Four
// glue_opc_ctrl engines, one per chain, read the FIFO in parallel and drive
// the four chain OPCODE buses.
//
// Main FSM: it counts, per chain, the OPCODEs the chain has processed and the
// GLUE has not yet retired. Only chains with none outstanding, i.e. still on
// the oldest criterion, get Space Available, so roads of different criteria
// never mix. When every chain has processed the oldest OPCODE and the road
// path is empty, the FSM pulses road_end_o to the TOP GLUE for one cycle and
// removes that OPCODE (one or two words) from the FIFO.
//
// Interface timing: chain and output buses use the DA/SA packet handshake
// (see amchip). opc_i carries OP_NOP when idle; the sender must not put more
// than three words in flight that have not been retired.
//
// The structure (input register, three-word FIFO, four OPC CTRLs, Main FSM
// and its three tasks) follows the GLUE description; counters, encodings
// and the space rule are this design's choices.
module glue
  import am_pkg::*;
#(
  parameter int unsigned N_WAIT = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // AM chip chains
  input  word_t [N_CHAINS-1:0]          chain_data_i,
  input  logic  [N_CHAINS-1:0]          chain_da_i,
  output logic  [N_CHAINS-1:0]          chain_sa_o,
  input  logic  [N_CHAINS-1:0]          chain_wda_i,
  output logic  [N_CHAINS-1:0][OPC_W-1:0] chain_opc_o,
  // from the TOP GLUE
  input  logic [OPC_W-1:0]              opc_i,
  // to the TOP GLUE
  output word_t                         road_data_o,
  output logic                          road_da_o,
  input  logic                          road_sa_i,
  output logic                          road_end_o
);

  // ------------------------------------------------------- Opcode FIFO
  logic [OPC_W-1:0] opc_q;
  logic             opc_q_data;     // opc_q is the DATA word of a two-word OPCODE
  logic [OPC_W-1:0] fifo_w [OPC_FIFO_DEPTH];
  logic [1:0]       fifo_cnt;
  logic [1:0]       pop_n;

  wire push = opc_q_data || (opc_q != OP_NOP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opc_q      <= OP_NOP;
      opc_q_data <= 1'b0;
      fifo_w     <= '{default: OP_NOP};
      fifo_cnt   <= '0;
    end else begin
      automatic logic [1:0] cnt = fifo_cnt - pop_n;
      opc_q      <= opc_i;
      opc_q_data <= !opc_q_data && opc_is_two_word(opc_q);
      for (int k = 0; k < OPC_FIFO_DEPTH; k++) begin
        if (k + int'(pop_n) < OPC_FIFO_DEPTH) fifo_w[k] <= fifo_w[k + int'(pop_n)];
      end
      if (push) begin
        fifo_w[cnt] <= opc_q;
        cnt         = cnt + 2'd1;
      end
      fifo_cnt <= cnt;
    end
  end

  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n)
                                push |-> (fifo_cnt - pop_n) < 2'(OPC_FIFO_DEPTH));

  // ---------------------------------------------------------- OPC CTRLs
  logic [N_CHAINS-1:0] chain_end;

  for (genvar c = 0; c < N_CHAINS; c++) begin : g_opc
    glue_opc_ctrl #(.N_WAIT(N_WAIT)) u_opc (
      .clk        (clk),
      .rst_n      (rst_n),
      .fifo_w_i   (fifo_w),
      .fifo_cnt_i (fifo_cnt),
      .pop_n_i    (pop_n),
      .wired_da_i (chain_wda_i[c]),
      .opc_o      (chain_opc_o[c]),
      .road_end_o (chain_end[c])
    );
  end

  // ----------------------------------------------------------- Main FSM
  logic [1:0]          ahead [N_CHAINS];
  logic [N_CHAINS-1:0] allow;
  logic                path_empty;
  logic                all_done;

  always_comb begin
    all_done = 1'b1;
    for (int c = 0; c < N_CHAINS; c++) begin
      allow[c] = (ahead[c] == 2'd0) && !chain_end[c];
      if (ahead[c] == 2'd0) all_done = 1'b0;
    end
  end

  wire retire = all_done && path_empty;
  assign pop_n = retire ? (opc_is_two_word(fifo_w[0]) ? 2'd2 : 2'd1) : 2'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ahead      <= '{default: 2'd0};
      road_end_o <= 1'b0;
    end else begin
      for (int c = 0; c < N_CHAINS; c++)
        ahead[c] <= ahead[c] + 2'(chain_end[c]) - 2'(retire);
      road_end_o <= retire;
    end
  end

  // ---------------------------------------------------------- road path
  road_merge #(.N(N_CHAINS)) u_merge (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_data_i  (chain_data_i),
    .in_da_i    (chain_da_i),
    .in_sa_o    (chain_sa_o),
    .allow_i    (allow),
    .out_data_o (road_data_o),
    .out_da_o   (road_da_o),
    .out_sa_i   (road_sa_i),
    .empty_o    (path_empty)
  );

endmodule
