// tb_diode_or: random test of a 12-input programmable diode OR gate with all
// memristors in LRS, and of one with the upper half left in HRS; walking-one
// patterns show that each input alone can raise the output.
module tb_diode_or;
  logic [11:0] in;
  logic        y_all, y_half;
  int checks = 0, failures = 0;

  diode_or #(.N(12))                          u_all  (.in(in), .out(y_all));
  diode_or #(.N(12), .CELL_LRS(12'h03f))      u_half (.in(in), .out(y_half));

  task automatic chk;
    bit ea = 1'b0, eh = 1'b0;
    for (int i = 0; i < 12; i++) begin
      ea |= in[i];
      if (i < 6) eh |= in[i];
    end
    #1;
    checks += 2;
    if (y_all  !== ea) begin failures++; $display("FAIL all in=%h", in); end
    if (y_half !== eh) begin failures++; $display("FAIL half in=%h", in); end
  endtask

  initial begin
    in = '0; chk();
    for (int i = 0; i < 12; i++) begin in = 12'(1) << i; chk(); end
    repeat (200) begin in = 12'($urandom) & 12'($urandom); chk(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
