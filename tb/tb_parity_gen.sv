// tb_parity_gen: self-checking test of the PCI parity machine.
//
// Random AD, C/BE# and AD-enable values are applied each clock. One clock
// later PAR must make the count of ones across the previous AD, C/BE# and
// PAR even, and par_oe must equal the previous AD enable. Reset must clear
// both outputs.
module tb_parity_gen;
  localparam int unsigned DATA_W = 32;
  logic clk = 1'b0, reset_l = 1'b0;
  logic [DATA_W-1:0] ad = '0;
  logic ad_oe = 1'b0;
  logic [3:0] cbe_l = '0;
  logic par, par_oe;
  int checks = 0, failures = 0;

  parity_gen #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [DATA_W-1:0] p_ad;
    logic [3:0] p_cbe;
    logic p_oe;
    int ones;
    @(posedge clk); #1;
    check(par == 1'b0 && par_oe == 1'b0, "reset clears outputs");
    reset_l = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      ad = {$urandom}; cbe_l = 4'($urandom); ad_oe = 1'($urandom);
      if (i % 7 == 0) ad = '0;
      p_ad = ad; p_cbe = cbe_l; p_oe = ad_oe;
      @(posedge clk); #1;
      ones = $countones({p_ad, p_cbe}) + int'(par);
      check(ones % 2 == 0, "even parity over AD, C/BE# and PAR");
      check(par_oe == p_oe, "PAR enable lags AD enable by one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
