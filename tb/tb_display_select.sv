// tb_display_select: random values for every variable under each option
// setting, the digits read back with the reference segment table.
module tb_display_select;
  import tb_seg_pkg::*;
  logic [3:0] option;
  logic [5:0] hour, minute, date, alm_hour, alm_minute, sw_minute, sw_second;
  logic [3:0][6:0] digits;
  logic [3:0] dp_en;
  int checks = 0, failures = 0;

  display_select dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_pairs(input int hi, input int lo, input logic [3:0] dp);
    logic [3:0][6:0] e;
    e[3] = (hi < 0) ? 7'h7F : ref_seg(hi / 10);
    e[2] = (hi < 0) ? 7'h7F : ref_seg(hi % 10);
    e[1] = (lo < 0) ? 7'h7F : ref_seg(lo / 10);
    e[0] = (lo < 0) ? 7'h7F : ref_seg(lo % 10);
    checks++;
    if (digits !== e || dp_en !== dp) begin
      failures++;
      $display("option %b: digits %h dp %b expected %h %b", option, digits, dp_en, e, dp);
    end
  endtask

  initial begin
    for (int i = 0; i < 300; i++) begin
      hour = 6'($urandom_range(0, 23));    minute = 6'($urandom_range(0, 59));
      date = 6'($urandom_range(0, 31));    alm_hour = 6'($urandom_range(0, 23));
      alm_minute = 6'($urandom_range(0, 59));
      sw_minute = 6'($urandom_range(0, 59)); sw_second = 6'($urandom_range(0, 59));
      for (int o = 0; o < 16; o++) begin
        option = 4'(o);
        #1;
        case (o)
          1: expect_pairs(int'(hour), int'(minute), 4'b0100);
          2: expect_pairs(-1, int'(date), 4'b0000);
          4: expect_pairs(int'(alm_hour), int'(alm_minute), 4'b0100);
          8: expect_pairs(int'(sw_minute), int'(sw_second), 4'b0100);
          default: expect_pairs(-1, -1, 4'b0000);
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
