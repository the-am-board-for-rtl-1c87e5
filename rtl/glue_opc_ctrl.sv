// glue_opc_ctrl -- OPCODE engine for one AM chip chain (one "OPC CTRL").
//
// The GLUE holds the OPCODE words not yet retired by all four chains in a
// three-word FIFO that every engine reads in parallel. Each engine keeps its
// own read offset into that FIFO, so a chain that has exhausted its roads may
// move on to the next matching criterion while the other chains are still
// working on the previous one.
//
// An engine writes the next OPCODE into its output register only when the
// previous one is processed. A two-word OPCODE (OPCODE word plus DATA word)
// is sent only when both words are in the FIFO, on two consecutive cycles.
// The output is OP_NOP when nothing is sent. An OPCODE is processed when
// (1) at least N_WAIT cycles have passed since it could close and
// (2) the chain's wired Data Available is low. It can close as soon as it is
// sent, except OP_INIT: its criterion covers the whole hit input phase, so
// it can close only once a later OPCODE (sent after End-of-Hit) is queued,
// and the N_WAIT count starts then. This lets roads from the last hits of the
// event reach wired_DA before the criterion is closed. When the OPCODE is
// processed the engine pulses road_end_o for one cycle.
//
// pop_i/pop_n_i: the Main FSM removes pop_n_i words from the FIFO head at the
// end of this cycle; the engine shifts its offset with them.
//
// The per-chain engines, the shared FIFO, the two-word rule and the
// N-cycles-and-wired_DA test follow the GLUE description; the OP_INIT rule
// and the offset bookkeeping are this design's own.
module glue_opc_ctrl
  import am_pkg::*;
#(
  parameter int unsigned N_WAIT = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [OPC_W-1:0]       fifo_w_i [OPC_FIFO_DEPTH],
  input  logic [1:0]             fifo_cnt_i,
  input  logic [1:0]             pop_n_i,
  input  logic                   wired_da_i,
  output logic [OPC_W-1:0]       opc_o,
  output logic                   road_end_o
);

  localparam int unsigned TW = (N_WAIT > 1) ? $clog2(N_WAIT + 1) : 1;

  logic [1:0]       off;        // FIFO offset of the next OPCODE to send
  logic             busy;       // an OPCODE has been sent and not processed
  logic             send_data;  // DATA word goes out in this cycle
  logic [OPC_W-1:0] data_q;
  logic             cur_init;
  logic [TW-1:0]    timer;

  wire [OPC_W-1:0] head     = (off < 2'(OPC_FIFO_DEPTH)) ? fifo_w_i[off] : OP_NOP;
  wire             two_word = opc_is_two_word(head);
  wire             can_send = !busy && !send_data &&
                              (int'(off) + (two_word ? 2 : 1) <= int'(fifo_cnt_i));
  wire             closable = busy && !send_data && (!cur_init || (off < fifo_cnt_i));
  wire             done     = closable && (int'(timer) >= int'(N_WAIT)) && !wired_da_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      off        <= '0;
      busy       <= 1'b0;
      send_data  <= 1'b0;
      data_q     <= '0;
      cur_init   <= 1'b0;
      timer      <= '0;
      opc_o      <= OP_NOP;
      road_end_o <= 1'b0;
    end else begin
      automatic logic [1:0] off_n = off;
      opc_o      <= OP_NOP;
      road_end_o <= 1'b0;
      send_data  <= 1'b0;
      if (send_data) begin
        opc_o <= data_q;
      end else if (can_send) begin
        opc_o     <= head;
        busy      <= 1'b1;
        cur_init  <= (head == OP_INIT);
        timer     <= '0;
        off_n     = off + (two_word ? 2'd2 : 2'd1);
        if (two_word) begin
          send_data <= 1'b1;
          data_q    <= fifo_w_i[off[0] + 2'd1];
        end
      end else if (done) begin
        busy       <= 1'b0;
        road_end_o <= 1'b1;
      end else if (closable && int'(timer) < int'(N_WAIT)) begin
        timer <= timer + 1'b1;
      end
      off <= off_n - pop_n_i;
    end
  end

  // The Main FSM may only retire words this engine has already sent.
  a_pop_sent: assert property (@(posedge clk) disable iff (!rst_n)
                               pop_n_i <= off);

endmodule
