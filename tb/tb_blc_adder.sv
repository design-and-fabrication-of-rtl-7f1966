// tb_blc_adder: exhaustive check of the 8-bit BLC adder (all a, b, carry
// inputs) against integer addition, including the critical-path vector
// A7..A1 = 1111111, B = 0, ASS = 1 with A0 toggling.
module tb_blc_adder;
  logic [7:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  blc_adder #(.W(8)) dut (.a, .b, .cin, .s, .cout);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); cin = c[0];
          #1;
          checks++;
          if ({cout, s} != 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d -> %0d", i, j, c, {cout, s});
          end
        end
    // Critical path: carry from bit 0 ripples to S7 and S8.
    a = 8'b1111_1110; b = 8'h00; cin = 1'b1; #1;
    checks++; if ({cout, s} != 9'h0ff) failures++;
    a = 8'b1111_1111; #1;
    checks++; if ({cout, s} != 9'h100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
