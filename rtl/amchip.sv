// amchip -- associative memory chip with its road pipeline interface.
//
// The chip stores NPATT patterns. A pattern holds one superstrip address per
// layer. Hits arrive on six per-layer buses; every hit is compared with the
// same layer of all patterns at once, and a match sets that layer's bit in
// the pattern's bitmap. A pattern becomes a matched road when the number of
// fired layers reaches THR and every layer enabled by required_layers has
// fired. Matched roads are read out lowest pattern first as two-word packets
// (Road-ADD, then the bitmap) and merged with the packets that arrive from
// the upstream chip of the chain, so that the chain moves all roads to the
// GLUE. A road is sent once per event: lowering THR later releases only the
// roads that were not already sent.
//
// OPCODEs (am_pkg): OP_INIT clears the match state of the event and loads the
// default criterion (cfg_thr_i, cfg_req_i). OP_DEC_THR is followed by a data
// word holding the new THR; the patterns are then re-tested with it.
//
// Road-ADD word: {CHIP_ID, pattern index}. Bitmap word: the six fired-layer
// bits in the low bits, upper bits zero.
//
// Chain handshake (both directions): a packet transfer starts on a rising
// edge where the sender's DA and the receiver's SA are both high; the
// Road-ADD word is on the bus in that cycle and the bitmap word follows in the
// next cycle whatever the control lines do. The sender keeps DA low while
// the bitmap word is on the bus. SA means room for a whole packet. Board
// pins are active low; this RTL uses active-high signals throughout.
//
// wired_da_o is high while the chip holds any road: matched but not yet
// read, or buffered for the chain. It is registered.
//
// Timing: a hit captured at edge k marks the bitmaps at k+1; the road can be
// taken for read-out at k+2, when wired_da_o also rises. An upstream packet
// needs three cycles to pass through the chip's one-packet input buffer.
//
// The matching rule, THR/required_layers, the packet format and the DA/SA
// protocol follow the AM++ description. The chip's insides (buffer sizes,
// read-out order, the parallel pattern-load port standing in for the JTAG
// load path, the OPCODE encoding) are this design's choices.
module amchip
  import am_pkg::*;
#(
  parameter int unsigned NPATT   = 4096,
  parameter int unsigned PAT_W   = (NPATT > 1) ? $clog2(NPATT) : 1,
  parameter int unsigned CHIP_ID = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Per-layer hit buses from the INDI chips.
  input  layer_hit_t [N_LAYERS-1:0] hit_i,
  // OPCODE bus from the GLUE (OP_NOP when idle).
  input  logic [OPC_W-1:0]     opc_i,
  // Default matching criterion loaded by OP_INIT.
  input  logic [3:0]           cfg_thr_i,
  input  logic [1:0]           cfg_req_i,
  // Pattern bank write port.
  input  logic                 pat_we_i,
  input  logic [PAT_W-1:0]     pat_addr_i,
  input  logic [N_LAYERS-1:0][SS_W-1:0] pat_ss_i,
  // Road bus from the upstream chip.
  input  word_t                up_data_i,
  input  logic                 up_da_i,
  output logic                 up_sa_o,
  // Road bus towards the GLUE.
  output word_t                dn_data_o,
  output logic                 dn_da_o,
  input  logic                 dn_sa_i,
  output logic                 wired_da_o
);

  localparam int unsigned ID_W = WORD_W - PAT_W;

  // ---------------------------------------------------------------- bank
  logic [SS_W-1:0] pat [NPATT][N_LAYERS];

  always_ff @(posedge clk) begin
    if (pat_we_i) begin
      for (int l = 0; l < N_LAYERS; l++) pat[pat_addr_i][l] <= pat_ss_i[l];
    end
  end

  // ----------------------------------------------------- input registers
  layer_hit_t [N_LAYERS-1:0] hit_q;
  logic [OPC_W-1:0] opc_q;
  logic             exp_data;   // opc_q holds the data word of OP_DEC_THR

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_q    <= '0;
      opc_q    <= OP_NOP;
      exp_data <= 1'b0;
    end else begin
      hit_q    <= hit_i;
      opc_q    <= opc_i;
      exp_data <= !exp_data && opc_is_two_word(opc_q);
    end
  end

  wire do_init   = !exp_data && (opc_q == OP_INIT);
  wire do_newthr = exp_data;
  logic any_hit;
  always_comb begin
    any_hit = 1'b0;
    for (int l = 0; l < N_LAYERS; l++) any_hit |= hit_q[l].valid;
  end

  // -------------------------------------------------------- match state
  logic [3:0]          thr;
  logic [1:0]          req;
  logic [BITMAP_W-1:0] bm   [NPATT];
  logic [NPATT-1:0]    pend;          // matched, not yet read out
  logic [NPATT-1:0]    rd;            // already read out in this event
  logic [PAT_W:0]      npend;

  // Local road waiting for the output stage.
  logic             loc_valid;
  word_t            loc_addr;
  logic [BITMAP_W-1:0] loc_bm;
  logic             loc_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr       <= 4'd15;
      req       <= 2'b00;
      pend      <= '0;
      rd        <= '0;
      npend     <= '0;
      loc_valid <= 1'b0;
      loc_addr  <= '0;
      loc_bm    <= '0;
      for (int p = 0; p < NPATT; p++) bm[p] <= '0;
    end else begin
      automatic logic [3:0]     thr_n  = do_init ? cfg_thr_i : (do_newthr ? opc_q : thr);
      automatic logic [1:0]     req_n  = do_init ? cfg_req_i : req;
      automatic logic [PAT_W:0] n_new  = '0;
      automatic logic           taken  = 1'b0;

      thr <= thr_n;
      req <= req_n;

      // Re-test the patterns when a hit arrives or the criterion changes.
      if (any_hit || do_init || do_newthr) begin
        for (int p = 0; p < NPATT; p++) begin
          automatic logic [BITMAP_W-1:0] nb;
          automatic logic pend_p = do_init ? 1'b0 : pend[p];
          automatic logic rd_p   = do_init ? 1'b0 : rd[p];
          nb = do_init ? '0 : bm[p];
          for (int l = 0; l < N_LAYERS; l++)
            if (hit_q[l].valid && pat[p][l] == hit_q[l].ss) nb[l] = 1'b1;
          bm[p] <= nb;
          if (do_init) begin
            pend[p] <= 1'b0;
            rd[p]   <= 1'b0;
          end
          if (!pend_p && !rd_p && road_passes(nb, thr_n, req_n)) begin
            pend[p] <= 1'b1;
            n_new   = n_new + 1'b1;
          end
        end
      end

      // Take the lowest pending road into the local packet register.
      if (loc_take) loc_valid <= 1'b0;
      if (!do_init && npend != 0 && (!loc_valid || loc_take)) begin
        for (int p = NPATT-1; p >= 0; p--) begin
          if (pend[p]) begin
            loc_addr <= word_t'({ID_W'(CHIP_ID), PAT_W'(p)});
            loc_bm   <= bm[p];
          end
        end
        for (int p = 0; p < NPATT; p++) begin
          if (pend[p] && !taken) begin
            pend[p] <= 1'b0;
            rd[p]   <= 1'b1;
            taken   = 1'b1;
          end
        end
        loc_valid <= 1'b1;
      end
      if (do_init) loc_valid <= 1'b0;

      npend <= (do_init ? '0 : npend - (PAT_W+1)'(taken)) + n_new;
    end
  end

  // ------------------------------------------------ upstream input buffer
  typedef enum logic [1:0] {IB_EMPTY, IB_W2, IB_FULL} ib_state_e;
  ib_state_e ib_state;
  word_t     ib_w1, ib_w2;
  logic      ib_take;

  assign up_sa_o = (ib_state == IB_EMPTY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ib_state <= IB_EMPTY;
      ib_w1    <= '0;
      ib_w2    <= '0;
    end else begin
      unique case (ib_state)
        IB_EMPTY: if (up_da_i) begin
          ib_w1    <= up_data_i;
          ib_state <= IB_W2;
        end
        IB_W2: begin
          ib_w2    <= up_data_i;
          ib_state <= IB_FULL;
        end
        IB_FULL: if (ib_take) ib_state <= IB_EMPTY;
        default: ib_state <= IB_EMPTY;
      endcase
    end
  end

  // ------------------------------------------------------- output stage
  typedef enum logic [1:0] {OB_EMPTY, OB_W1, OB_W2} ob_state_e;
  ob_state_e ob_state;
  word_t     ob_w1, ob_w2;
  logic      prio_up;   // alternate between upstream and local packets

  wire ob_free = (ob_state == OB_EMPTY) || (ob_state == OB_W2);
  wire up_rdy  = (ib_state == IB_FULL);

  always_comb begin
    ib_take  = 1'b0;
    loc_take = 1'b0;
    if (ob_free) begin
      if (up_rdy && (prio_up || !loc_valid)) ib_take  = 1'b1;
      else if (loc_valid)                    loc_take = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ob_state <= OB_EMPTY;
      ob_w1    <= '0;
      ob_w2    <= '0;
      prio_up  <= 1'b0;
    end else begin
      if (ob_state == OB_W1 && dn_sa_i) ob_state <= OB_W2;
      if (ob_free) begin
        if (ib_take) begin
          ob_w1    <= ib_w1;
          ob_w2    <= ib_w2;
          ob_state <= OB_W1;
          prio_up  <= 1'b0;
        end else if (loc_take) begin
          ob_w1    <= loc_addr;
          ob_w2    <= word_t'(loc_bm);
          ob_state <= OB_W1;
          prio_up  <= 1'b1;
        end else begin
          ob_state <= OB_EMPTY;
        end
      end
    end
  end

  assign dn_da_o   = (ob_state == OB_W1);
  assign dn_data_o = (ob_state == OB_W2) ? ob_w2 : ob_w1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wired_da_o <= 1'b0;
    else        wired_da_o <= (npend != 0) || loc_valid ||
                              (ib_state != IB_EMPTY) || (ob_state != OB_EMPTY);
  end

  // The data word of OP_DEC_THR must be a legal threshold.
  a_thr_range: assert property (@(posedge clk) disable iff (!rst_n)
                                do_newthr |-> opc_q <= 4'(N_LAYERS + 1));

endmodule
