// tb_feedback_reg: random test of the three feedback flip-flops: each one
// loads its input only in cycles in which its Sig enable is high.
module tb_feedback_reg;
  localparam int NFB = 3;
  logic           clk = 1'b0;
  logic [NFB-1:0] sig, d, q, model;
  int checks = 0, failures = 0;

  feedback_reg #(.NFB(NFB)) dut (.clk, .sig, .d, .q);

  always #5 clk = ~clk;

  initial begin
    sig = '1; d = '0;
    @(negedge clk);
    model = '0;
    repeat (300) begin
      sig = NFB'($urandom); d = NFB'($urandom);
      @(negedge clk);
      for (int f = 0; f < NFB; f++) if (sig[f]) model[f] = d[f];
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%b model=%b", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
