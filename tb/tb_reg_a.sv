// tb_reg_a: random loads and scaling of register A, against a model.
module tb_reg_a;
  logic       clk = 0, rst_n = 0;
  logic [7:0] d, ar, ai, mr, mi;
  logic       lar, lai, scale;
  int checks = 0, failures = 0;

  reg_a #(.W(8)) dut (.clk, .rst_n, .d, .lar, .lai, .scale, .ar, .ai);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0; lar = 0; lai = 0; scale = 0; mr = 0; mi = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      d = 8'($urandom); lar = 1'($urandom); lai = 1'($urandom);
      scale = ($urandom % 4) == 0;
      if (scale) begin
        mr = 8'($signed(mr) >>> 1);
        mi = 8'($signed(mi) >>> 1);
      end else begin
        if (lar) mr = d;
        if (lai) mi = d;
      end
      @(posedge clk); #1;
      checks++;
      if (ar != mr || ai != mi) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d %h %h exp %h %h", i, ar, ai, mr, mi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
