// tb_coef_reg: random loads of the Kr/Ki coefficient registers.
module tb_coef_reg;
  logic       clk = 0, rst_n = 0;
  logic [7:0] d, kr, ki, mr, mi;
  logic       lkr, lki;
  int checks = 0, failures = 0;

  coef_reg #(.W(8)) dut (.clk, .rst_n, .d, .lkr, .lki, .kr, .ki);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0; lkr = 0; lki = 0; mr = 0; mi = 0;
    repeat (2) @(posedge clk);
    checks++; if (kr != 0 || ki != 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      d = 8'($urandom); lkr = 1'($urandom); lki = 1'($urandom);
      if (lkr) mr = d;
      if (lki) mi = d;
      @(posedge clk); #1;
      checks++;
      if (kr != mr || ki != mi) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
