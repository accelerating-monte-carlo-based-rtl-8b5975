// tb_share_mux: a 5-to-1 and a 1-to-1 instance with 32-bit operands; every
// select value is checked against the input it names.
module tb_share_mux;
  int checks = 0, failures = 0;

  logic [2:0]  sel;
  logic [31:0] in5 [5], out5;
  logic [0:0]  sel1;
  logic [31:0] in1 [1], out1;

  share_mux #(.N(5), .T(logic [31:0])) u5 (.sel, .in(in5), .out(out5));
  share_mux #(.N(1), .T(logic [31:0])) u1 (.sel(sel1), .in(in1), .out(out1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      foreach (in5[i]) in5[i] = $urandom;
      in1[0] = $urandom;
      sel  = 3'($urandom_range(0, 4));
      sel1 = 1'b0;
      #1;
      checks++;
      if (out5 !== in5[sel] || out1 !== in1[0]) begin
        failures++;
        if (failures < 10) $display("sel %0d: got %h exp %h", sel, out5, in5[sel]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
