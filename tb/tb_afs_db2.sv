// tb_afs_db2: self-checking test of the shared shift-add coefficient network.
//
// Drives random operands whose low 14 bits are zero (as the filter supplies
// them) and checks every product exactly against integer coefficients
// worked out by hand from the canonical signed digit forms, in units of
// 2^-14:
//   h0 = -(2^-3 + 1.125*2^-8)              -> -2120
//   h1 =  2^-2 - 0.75*2^-5 - 1.25*2^-9     ->  3672
//   h2 =  0.875 - 1.25*2^-5 + 1.125*2^-11  -> 13705
//   h3 =  2^-1 - 1.125*2^-6 + 1.125*2^-11  ->  7913
// Their sum, 23170/16384 = 1.41418, is the Db2 low-pass DC gain sqrt(2).
module tb_afs_db2;

  localparam int XW = 40;
  localparam longint COEF [4] = '{-2120, 3672, 13705, 7913};

  logic signed [XW-1:0] x;
  logic signed [XW+1:0] y [4];
  int checks = 0, failures = 0;

  afs_db2 #(.XW(XW)) dut (.iX(x), .oY0(y[0]), .oY1(y[1]), .oY2(y[2]), .oY3(y[3]));

  task automatic check_one(input longint r);
    x = XW'(r <<< 14);
    #1;
    for (int k = 0; k < 4; k++) begin
      longint exp_v = r * COEF[k];
      checks++;
      if (longint'(y[k]) != exp_v) begin
        failures++;
        $display("FAIL x=%0d Y%0d=%0d expected %0d", r, k, longint'(y[k]), exp_v);
      end
    end
  endtask

  initial begin
    check_one(0);
    check_one(1);
    check_one(-1);
    check_one(1024);
    check_one((1 <<< 25) - 1);
    check_one(-(1 <<< 25));
    for (int i = 0; i < 2000; i++) begin
      automatic longint r = longint'($signed(26'($urandom)));
      check_one(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
