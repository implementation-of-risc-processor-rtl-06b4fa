// Self-checking testbench of cs_to_bin: random and corner carry/sum words, y = c + s mod 2^32.
module tb_cs_to_bin;
  logic [31:0] c, s, y;
  int checks = 0, failures = 0;

  cs_to_bin #(.W(32)) dut (.c(c), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      c = $urandom; s = $urandom;
      if (i == 0) begin c = '1; s = 32'd1; end
      if (i == 1) begin c = 32'h7fff_ffff; s = 32'h7fff_ffff; end
      #1;
      checks++;
      if (y !== c + s) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
