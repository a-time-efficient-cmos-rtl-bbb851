// tb_hybrid_driver: random test of a 9-line hybrid driver bank: a line must
// reach the output only when its control bit and the clock phase are high.
module tb_hybrid_driver;
  localparam int L = 9;
  logic [L-1:0] ctrl, line, drive;
  logic         en;
  int checks = 0, failures = 0;

  hybrid_driver #(.L(L)) dut (.ctrl(ctrl), .line(line), .en(en), .drive(drive));

  initial begin
    repeat (300) begin
      ctrl = L'($urandom); line = L'($urandom); en = 1'($urandom);
      #1;
      for (int j = 0; j < L; j++) begin
        checks++;
        if (drive[j] !== (ctrl[j] && line[j] && en)) begin
          failures++;
          $display("FAIL line %0d ctrl=%b line=%b en=%b", j, ctrl[j], line[j], en);
        end
      end
    end
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
