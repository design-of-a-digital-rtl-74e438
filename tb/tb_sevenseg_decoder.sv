// tb_sevenseg_decoder: every six-bit value through the two-digit decoder,
// compared with the reference segment list of tb_seg_pkg.
module tb_sevenseg_decoder;
  import tb_seg_pkg::*;
  logic [5:0] value;
  logic [6:0] tens, units;
  int checks = 0, failures = 0;

  sevenseg_decoder dut (.value(value), .tens(tens), .units(units));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      value = 6'(v);
      #1;
      checks++;
      if (tens !== ref_seg(v / 10) || units !== ref_seg(v % 10)) begin
        failures++;
        $display("value %0d: got %b %b expected %b %b", v, tens, units,
                 ref_seg(v / 10), ref_seg(v % 10));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
