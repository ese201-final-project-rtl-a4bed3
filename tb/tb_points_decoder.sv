// tb_points_decoder: self-checking test of the point display decoder for
// every 8-bit signed value, against the reference of tb_seg_pkg: plain two
// digits for 0..99, a minus sign for -9..-1, units decimal point for any
// negative value and tens decimal point for a magnitude of 100 or more.
module tb_points_decoder;
  import dice_pkg::*;
  import tb_seg_pkg::*;
  points_t pts;
  seg_t    st, su;
  logic    dpt, dpu;
  int checks = 0, failures = 0;

  points_decoder dut (.points(pts), .seg_tens(st), .seg_units(su),
                      .dp_tens(dpt), .dp_units(dpu));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      logic [6:0] et, eu;
      logic edt, edu;
      points_pats(v, et, eu, edt, edu);
      pts = points_t'(v);
      #1;
      checks++;
      if (st != et || su != eu || dpt != edt || dpu != edu) begin
        failures++;
        $display("FAIL points %0d: %b %b %b %b", v, st, su, dpt, dpu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
