// tb_reg_b: loads Br and Bi, scales them and shifts them out bit by bit,
// checking each presented bit pair against the bits of B/2 (LSB first),
// plus random load/shift mixes against a model.
module tb_reg_b;
  logic       clk = 0, rst_n = 0;
  logic [7:0] d, br, bi, hr, hi;
  logic       lbr, lbi, scale, shift, br_bit, bi_bit;
  int checks = 0, failures = 0;

  reg_b #(.W(8)) dut (.clk, .rst_n, .d, .lbr, .lbi, .scale, .shift, .br_bit, .bi_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [7:0] dd, input logic l_r, l_i, sc, sh);
    @(negedge clk);
    d = dd; lbr = l_r; lbi = l_i; scale = sc; shift = sh;
    @(posedge clk); #1;
    d = 0; lbr = 0; lbi = 0; scale = 0; shift = 0;
  endtask

  initial begin
    d = 0; lbr = 0; lbi = 0; scale = 0; shift = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      br = 8'($urandom); bi = 8'($urandom);
      step(br, 1, 0, 0, 0);
      step(bi, 0, 1, 0, 0);
      step(8'h00, 0, 0, 1, 0);          // scale: B/2
      hr = {br[7], br[7:1]};
      hi = {bi[7], bi[7:1]};
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (br_bit != hr[j] || bi_bit != hi[j]) begin
          failures++;
          if (failures < 10) $display("FAIL b=%h/%h bit %0d", br, bi, j);
        end
        step(8'h00, 1, 1, 0, 1);        // loads lose against shift
      end
      // After 8 shifts only sign bits remain.
      checks++;
      if (br_bit != br[7] || bi_bit != bi[7]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
