// road_merge -- merges N two-word road streams into one, packets unbroken.
//
// This is the road path of the LAMB GLUE and of the TOP GLUE: an input
// multiplexer, an input register, a two-word FIFO and an output register, so
// a word needs at least three cycles from input to output. Each input and
// the output use the DA/SA packet handshake (see amchip): a packet starts on
// an edge where DA and SA are both high with the Road-ADD word on the bus,
// and the bitmap word follows on the next cycle unconditionally.
//
// Space Available is given to one input at a time, chosen round robin among
// the inputs whose DA is high and whose allow_i bit is set; the controlling
// FSM uses allow_i to hold streams that belong to a later matching
// criterion. SA is given only while the path holds at most two words
// (counting a bitmap word still to come), so the four-word path can always
// absorb the packet. The output raises DA only when the Road-ADD word is in
// the output register and its bitmap word is at the FIFO head, so the bitmap
// can follow on the next cycle whatever happens downstream.
//
// empty_o is high when no word is held or expected; the FSMs use it to send
// Road_end only after the last road has left.
//
// The register/FIFO/register structure is the one drawn for the GLUE; the
// arbitration and the space rule are this design's choices.
module road_merge
  import am_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  word_t  [N-1:0] in_data_i,
  input  logic   [N-1:0] in_da_i,
  output logic   [N-1:0] in_sa_o,
  input  logic   [N-1:0] allow_i,
  output word_t          out_data_o,
  output logic           out_da_o,
  input  logic           out_sa_i,
  output logic           empty_o
);

  localparam int unsigned SEL_W = (N > 1) ? $clog2(N) : 1;

  // Receive side.
  logic             rx_exp;          // bitmap word due on the next edge
  logic [SEL_W-1:0] rx_sel;
  logic [SEL_W-1:0] rr;              // round-robin start point
  // Input register.
  logic             in_v, in_first;
  word_t            in_w;
  // Two-word FIFO, entry 0 is the head.
  word_t            f_w [2];
  logic             f_first [2];
  logic [1:0]       f_cnt;
  // Output register.
  logic             o_v, o_first;
  word_t            o_w;

  logic [2:0] occ;
  assign occ = 3'(in_v) + 3'(f_cnt) + 3'(o_v) + 3'(rx_exp);
  assign empty_o = (occ == 0);

  // Choose the input that may start a packet in this cycle.
  logic             grant_v;
  logic [SEL_W-1:0] grant;
  always_comb begin
    grant_v = 1'b0;
    grant   = '0;
    for (int k = N-1; k >= 0; k--) begin
      automatic logic [SEL_W-1:0] c = SEL_W'((int'(rr) + k) % N);
      if (in_da_i[c] && allow_i[c]) begin
        grant_v = 1'b1;
        grant   = SEL_W'(c);
      end
    end
    in_sa_o = '0;
    if (grant_v && !rx_exp && occ <= 3'd2) in_sa_o[grant] = 1'b1;
  end

  wire hs_in = |(in_sa_o & in_da_i);

  // Output side.
  assign out_da_o   = o_v && o_first && (f_cnt != 0);
  assign out_data_o = o_w;
  wire o_cons = o_v && (o_first ? (out_da_o && out_sa_i) : 1'b1);
  wire o_load = (!o_v || o_cons) && (f_cnt != 0);
  wire f_pop  = o_load;
  wire f_push = in_v && ((f_cnt - 2'(f_pop)) < 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_exp   <= 1'b0;
      rx_sel   <= '0;
      rr       <= '0;
      in_v     <= 1'b0;
      in_first <= 1'b0;
      in_w     <= '0;
      f_w      <= '{default: '0};
      f_first  <= '{default: 1'b0};
      f_cnt    <= '0;
      o_v      <= 1'b0;
      o_first  <= 1'b0;
      o_w      <= '0;
    end else begin
      automatic logic [1:0] cnt = f_cnt;
      // output register
      if (o_load) begin
        o_v     <= 1'b1;
        o_w     <= f_w[0];
        o_first <= f_first[0];
      end else if (o_cons) begin
        o_v     <= 1'b0;
      end
      // FIFO
      if (f_pop) begin
        f_w[0]     <= f_w[1];
        f_first[0] <= f_first[1];
        cnt        = cnt - 2'd1;
      end
      if (f_push) begin
        f_w[cnt[0]]     <= in_w;
        f_first[cnt[0]] <= in_first;
        cnt             = cnt + 2'd1;
      end
      f_cnt <= cnt;
      // input register and receive side
      if (f_push) in_v <= 1'b0;
      if (rx_exp) begin
        in_v     <= 1'b1;
        in_w     <= in_data_i[rx_sel];
        in_first <= 1'b0;
        rx_exp   <= 1'b0;
      end else if (hs_in) begin
        in_v     <= 1'b1;
        in_w     <= in_data_i[grant];
        in_first <= 1'b1;
        rx_exp   <= 1'b1;
        rx_sel   <= grant;
        rr       <= SEL_W'((int'(grant) + 1) % N);
      end
    end
  end

  // A word must never arrive while the input register still holds one.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 (rx_exp || hs_in) && in_v |-> f_push);

endmodule
