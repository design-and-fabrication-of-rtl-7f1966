// tb_dru: random check of the data routing unit: both multiplexers, the
// load enable, hold and reset, against a model register in the testbench.
module tb_dru;
  logic       clk = 0, rst_n = 0;
  logic [7:0] v_in, h_in, res_in, q, model;
  logic       horiz, src_res, ld;
  int checks = 0, failures = 0;

  dru #(.W(8)) dut (.clk, .rst_n, .v_in, .h_in, .res_in, .horiz, .src_res, .ld, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v_in = 0; h_in = 0; res_in = 0; horiz = 0; src_res = 0; ld = 0;
    model = 0;
    repeat (2) @(posedge clk);
    checks++; if (q != 8'h00) failures++;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      v_in = 8'($urandom); h_in = 8'($urandom); res_in = 8'($urandom);
      horiz = 1'($urandom); src_res = 1'($urandom); ld = 1'($urandom);
      if (ld) model = src_res ? res_in : (horiz ? h_in : v_in);
      @(posedge clk); #1;
      checks++;
      if (q != model) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d q=%h exp=%h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
