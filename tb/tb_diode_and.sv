// tb_diode_and: exhaustive test of the programmable diode AND gate, once with
// all memristors in LRS and once with the middle memristor left in HRS, which
// removes that input from the gate.
module tb_diode_and;
  logic [2:0] in;
  logic       y_all, y_prog;
  int checks = 0, failures = 0;

  diode_and #(.N(3))                     u_all  (.in(in), .out(y_all));
  diode_and #(.N(3), .CELL_LRS(3'b101))  u_prog (.in(in), .out(y_prog));

  initial begin
    for (int v = 0; v < 8; v++) begin
      in = 3'(v);
      #1;
      checks += 2;
      if (y_all  !== (v == 7))                 begin failures++; $display("FAIL all-LRS in=%b", in); end
      if (y_prog !== (in[0] && in[2]))         begin failures++; $display("FAIL one-HRS in=%b", in); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
