// tb_seven_seg: checks all 16 digits of the seven-segment decoder against a
// table written per segment (which digits light segment a, b, ... g).
module tb_seven_seg;
  logic [3:0] digit;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  seven_seg dut (.digit, .seg_n);

  // digits that light each segment, a..g, as bit masks over 0..F
  string s [7];
  initial s = '{"0_2_3_5_6_7_8_9_A_C_E_F",  // a
                     "0_1_2_3_4_7_8_9_A_D",      // b
                     "0_1_3_4_5_6_7_8_9_A_B_D",  // c
                     "0_2_3_5_6_8_B_C_D_E",      // d
                     "0_2_6_8_A_B_C_D_E_F",      // e
                     "0_4_5_6_8_9_A_B_C_E_F",    // f
                     "2_3_4_5_6_8_9_A_B_D_E_F"}; // g

  function automatic bit lit(int seg, int d);
    string h;
    h = $sformatf("%X", 4'(d));
    h = h.toupper();
    for (int i = 0; i < s[seg].len(); i++)
      if (s[seg][i] == h[0]) return 1;
    return 0;
  endfunction

  initial begin
    #1;
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      for (int sg = 0; sg < 7; sg++) begin
        checks++;
        if (seg_n[sg] !== !lit(sg, d)) begin
          failures++;
          $display("FAIL digit %0h segment %0d: got %b", d, sg, seg_n[sg]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
