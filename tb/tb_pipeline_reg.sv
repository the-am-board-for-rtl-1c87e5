// tb_pipeline_reg -- self-checking test of the board pipeline register.
//
// Random hit buses and OPCODE words go in; each must come out unchanged one
// cycle later, and reset must leave no hit and OP_NOP.
module tb_pipeline_reg;
  import am_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  layer_hit_t [N_LAYERS-1:0] hin, hout;
  logic [OPC_W-1:0] oin, oout;

  pipeline_reg dut (.clk(clk), .rst_n(rst_n), .hit_i(hin), .opc_i(oin),
                    .hit_o(hout), .opc_o(oout));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    layer_hit_t [N_LAYERS-1:0] h;
    logic [OPC_W-1:0] o;
    hin = '1; oin = '1;
    @(posedge clk); #1;
    check(hout == '0 && oout == OP_NOP, "idle in reset");
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int l = 0; l < N_LAYERS; l++) h[l] = layer_hit_t'($urandom);
      o = OPC_W'($urandom);
      hin = h; oin = o;
      @(posedge clk); #1;
      check(hout == h, "hit buses");
      check(oout == o, "OPCODE bus");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
