// tb_tm_driver: the TM driver shifter must point at o1 after CLR0, drive only
// while Ctrl is high, and move to the next target after every Ctrl.
module tb_tm_driver;
  localparam int NTM = 6;
  logic           clk = 1'b0, clr0 = 1'b1, ctrl = 1'b0;
  logic [NTM-1:0] o;
  int ptr;
  int checks = 0, failures = 0;

  tm_driver #(.NTM(NTM)) dut (.clk, .clr0, .ctrl, .o);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    clr0 = 1'b0; ptr = 0;
    repeat (200) begin
      ctrl = 1'($urandom);
      clr0 = ($urandom % 16) == 0;
      #1;
      checks++;
      if (o !== (ctrl ? NTM'(1) << ptr : NTM'(0))) begin
        failures++; $display("FAIL o=%b ctrl=%b ptr=%0d", o, ctrl, ptr);
      end
      if (clr0) ptr = 0;
      else if (ctrl) ptr = ptr + 1;
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
