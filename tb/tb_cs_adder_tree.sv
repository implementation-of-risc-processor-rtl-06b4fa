// Self-checking testbench of cs_adder_tree with 19 inputs (the FCU's size) and with 5:
// random words, the carry-save result must equal the sum of the inputs modulo 2^32.
module tb_cs_adder_tree;
  logic [18:0][31:0] in19;
  logic [4:0][31:0]  in5;
  logic [31:0] s19, c19, s5, c5;
  int checks = 0, failures = 0;

  cs_adder_tree #(.N(19), .W(32)) dut19 (.in(in19), .sum(s19), .carry(c19));
  cs_adder_tree #(.N(5),  .W(32)) dut5  (.in(in5),  .sum(s5),  .carry(c5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] e19, e5;
      e19 = '0; e5 = '0;
      for (int k = 0; k < 19; k++) begin
        in19[k] = (i == 0) ? '1 : $urandom;
        e19 += in19[k];
      end
      for (int k = 0; k < 5; k++) begin
        in5[k] = $urandom;
        e5 += in5[k];
      end
      #1;
      checks += 2;
      if (s19 + c19 !== e19) failures++;
      if (s5 + c5 !== e5) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
