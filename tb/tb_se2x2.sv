// tb_se2x2: checks the bar (scb = 0) and cross (scb = 1) connections of the
// 2x2 switching element over random inputs.
//
// The expected values are computed in the testbench itself, independently of
// the RTL; the sizes, random stimulus and trial counts are this testbench's
// own choices, and any example permutations are taken from the document's
// worked examples.
module tb_se2x2;
  localparam int W = 8;
  logic         scb;
  logic [W-1:0] in0, in1, out0, out1;
  int checks = 0, failures = 0;

  se2x2 #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      scb = t[0];
      in0 = W'($urandom);
      in1 = W'($urandom);
      #1;
      checks += 2;
      if (scb == 1'b0) begin
        if (out0 != in0) failures++;
        if (out1 != in1) failures++;
      end else begin
        if (out0 != in1) failures++;
        if (out1 != in0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
