// tb_dtr_pe: destination-tag routing element, all input combinations for a
// 3-bit address with routing bit 1: every valid address must leave by the
// outlet equal to its routing bit when the pair's bits differ, the upper
// inlet decides otherwise, and an all-idle element stays bar.
//
// The expected values are computed in the testbench itself, independently of
// the RTL; the sizes, random stimulus and trial counts are this testbench's
// own choices, and any example permutations are taken from the document's
// worked examples.
module tb_dtr_pe;
  localparam int NB = 3, BIT = 1;
  logic [NB-1:0] a_in [2], a_out [2];
  logic          v_in [2], v_out [2];
  logic          scb;
  int checks = 0, failures = 0;

  dtr_pe #(.NB(NB), .BIT(BIT)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a0 = 0; a0 < 8; a0++)
      for (int a1 = 0; a1 < 8; a1++)
        for (int vv = 0; vv < 4; vv++) begin
          bit exp_scb;
          a_in[0] = NB'(a0); a_in[1] = NB'(a1);
          v_in[0] = vv[0];   v_in[1] = vv[1];
          #1;
          if (vv[0])      exp_scb = a0[BIT];
          else if (vv[1]) exp_scb = !a1[BIT];
          else            exp_scb = 0;
          checks++;
          if (scb != exp_scb) failures++;
          // each valid address at the outlet named by its routing bit
          if (vv[0] && (!vv[1] || a0[BIT] != a1[BIT])) begin
            checks++;
            if (!(v_out[a0[BIT]] && a_out[a0[BIT]] == NB'(a0))) failures++;
          end
          if (vv[1] && (!vv[0] || a0[BIT] != a1[BIT])) begin
            checks++;
            if (!(v_out[a1[BIT]] && a_out[a1[BIT]] == NB'(a1))) failures++;
          end
          checks++;
          if ((v_out[0] + v_out[1]) != (vv[0] + vv[1])) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
