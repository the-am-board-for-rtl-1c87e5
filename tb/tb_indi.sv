// tb_indi -- self-checking test of the INDI fan-out.
//
// Random hits are driven into an 8-way INDI; one cycle later every output
// must carry the same hit, and after reset all outputs are idle.
module tb_indi;
  import am_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  layer_hit_t hin;
  layer_hit_t [7:0] hout;

  indi #(.FANOUT(8)) dut (.clk(clk), .rst_n(rst_n), .hit_i(hin), .hit_o(hout));

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
    layer_hit_t h;
    hin = '0;
    @(negedge clk); hin = '1;
    @(posedge clk); #1;
    for (int k = 0; k < 8; k++) check(hout[k] == '0, "idle in reset");
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      h = layer_hit_t'($urandom);
      hin = h;
      @(posedge clk); #1;
      for (int k = 0; k < 8; k++) check(hout[k] == h, $sformatf("output %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
