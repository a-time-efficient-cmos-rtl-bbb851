// tb_mod2_counter: the modulo-two counter against a parity model under random
// toggle and clear requests; also checks q_nx, ~Q and that CLR wins.
module tb_mod2_counter;
  logic clk = 1'b0, clr = 1'b1, t = 1'b0;
  logic q, qn, q_nx;
  bit   model;
  int checks = 0, failures = 0;

  mod2_counter dut (.clk, .clr, .t, .q, .qn, .q_nx);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    clr = 1'b0; model = 1'b0;
    for (int n = 0; n < 400; n++) begin
      t   = 1'($urandom);
      clr = ($urandom % 8) == 0;
      #1;
      checks += 3;
      if (q !== model)   begin failures++; $display("FAIL q=%b model=%b", q, model); end
      if (qn !== ~model) begin failures++; $display("FAIL qn"); end
      if (q_nx !== (clr ? 1'b0 : model ^ t)) begin failures++; $display("FAIL q_nx"); end
      model = clr ? 1'b0 : model ^ t;
      @(negedge clk);
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
