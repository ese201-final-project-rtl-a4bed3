// tb_mux2: self-checking test of the 2-to-1 multiplexer at the widths the
// datapath uses (2-bit bets and 8-bit points), with random inputs.
module tb_mux2;
  logic       sel2, sel8;
  logic [1:0] a1, a0, y2;
  logic [7:0] b1, b0, y8;
  int checks = 0, failures = 0;

  mux2 #(.W(2)) dut_bet    (.sel(sel2), .in1(a1), .in0(a0), .y(y2));
  mux2 #(.W(8)) dut_points (.sel(sel8), .in1(b1), .in0(b0), .y(y8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      sel2 = 1'($urandom); sel8 = 1'($urandom);
      a1 = 2'($urandom); a0 = 2'($urandom);
      b1 = 8'($urandom); b0 = 8'($urandom);
      #1;
      checks += 2;
      if (y2 !== (sel2 ? a1 : a0)) begin
        failures++; $display("FAIL bet mux sel=%0b %0d %0d -> %0d", sel2, a1, a0, y2);
      end
      if (y8 !== (sel8 ? b1 : b0)) begin
        failures++; $display("FAIL points mux sel=%0b %0d %0d -> %0d", sel8, b1, b0, y8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
