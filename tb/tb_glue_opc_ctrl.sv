// tb_glue_opc_ctrl -- self-checking test of one GLUE OPCODE engine.
//
// The test plays the Opcode FIFO and the Main FSM around the engine. It
// checks that OP_INIT goes out as soon as it is queued and stays open while
// nothing follows it; that a two-word OPCODE whose DATA word is missing is
// held; that the criterion closes exactly N_WAIT+1 cycles after it can close
// when wired_DA is low, and is held while wired_DA is high; that the two
// words of OP_DEC_THR go out on consecutive cycles; and that the engine
// follows the FIFO when the Main FSM removes retired words.
module tb_glue_opc_ctrl;
  import am_pkg::*;

  localparam int unsigned NW = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [OPC_W-1:0] fifo_w [OPC_FIFO_DEPTH];
  logic [1:0] cnt, pop_n;
  logic wda;
  logic [OPC_W-1:0] opc;
  logic road_end;

  glue_opc_ctrl #(.N_WAIT(NW)) dut (
    .clk(clk), .rst_n(rst_n), .fifo_w_i(fifo_w), .fifo_cnt_i(cnt),
    .pop_n_i(pop_n), .wired_da_i(wda), .opc_o(opc), .road_end_o(road_end));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Record what leaves the engine, with the cycle number.
  int cyc = 0;
  int n_end = 0, last_end = -1;
  logic [OPC_W-1:0] sent [$];
  int sent_t [$];
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (opc != OP_NOP || (sent.size() > 0 && sent[$] == OP_DEC_THR && sent_t[$] == cyc - 1)) begin
      sent.push_back(opc); sent_t.push_back(cyc);
    end
    if (road_end) begin n_end++; last_end = cyc; end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    fifo_w = '{default: OP_NOP}; cnt = 0; pop_n = 0; wda = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(sent.size() == 0, "nothing sent from an empty FIFO");

    // Queue INIT.
    fifo_w[0] = OP_INIT; cnt = 1;
    repeat (3) @(negedge clk);
    check(sent.size() == 1 && sent[0] == OP_INIT, "INIT sent");
    repeat (30) @(negedge clk);
    check(n_end == 0, "INIT stays open while nothing follows it");

    // Only the first word of DEC_THR arrives.
    fifo_w[1] = OP_DEC_THR; cnt = 2;
    t0 = cyc;
    wda = 1;
    repeat (20) @(negedge clk);
    check(n_end == 0, "INIT held while wired_DA is high");
    wda = 0; t0 = cyc;
    repeat (3) @(negedge clk);
    check(n_end == 1 && last_end - t0 <= 2, $sformatf("INIT closes right after wired_DA falls (%0d)", last_end - t0));
    repeat (5) @(negedge clk);
    check(sent.size() == 1, "DEC_THR without its DATA word is held");
    fifo_w[2] = 4'd5; cnt = 3;
    repeat (4) @(negedge clk);
    check(sent.size() == 3, $sformatf("DEC_THR and DATA sent (%0d words)", sent.size()));
    if (sent.size() == 3) begin
      check(sent[1] == OP_DEC_THR && sent[2] == 4'd5, "words in order");
      check(sent_t[2] == sent_t[1] + 1, "DATA on the cycle after DEC_THR");
    end
    // Main FSM retires INIT.
    pop_n = 1;
    @(negedge clk);
    pop_n = 0; fifo_w[0] = OP_DEC_THR; fifo_w[1] = 4'd5; fifo_w[2] = OP_NOP; cnt = 2;
    // DEC_THR was sent at sent_t[1]; it closes after N_WAIT counted cycles.
    repeat (NW + 6) @(negedge clk);
    check(n_end == 2, "DEC_THR closed");
    check(last_end - sent_t[2] == NW + 1, $sformatf("close %0d cycles after DATA, expected %0d", last_end - sent_t[2], NW + 1));

    // Retire DEC_THR, queue the next INIT: it is sent and the offset is right.
    pop_n = 2;
    @(negedge clk);
    pop_n = 0; fifo_w = '{default: OP_NOP}; cnt = 0;
    repeat (3) @(negedge clk);
    fifo_w[0] = OP_INIT; cnt = 1;
    repeat (3) @(negedge clk);
    check(sent.size() == 4 && sent[3] == OP_INIT, "next event's INIT sent");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
