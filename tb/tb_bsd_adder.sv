// Self-checking testbench for bsd_adder: random BSD operands, including all
// digit patterns, are added and the value of the sum (pos - neg) is compared
// with the integer sum of the operand values worked out in the testbench.
module tb_bsd_adder;
  localparam int unsigned N = 24;

  logic [N-1:0] xp, xn, yp, yn;
  logic [N:0]   sp, sn;
  int           checks = 0, failures = 0;

  bsd_adder #(.N(N)) dut (.x_pos(xp), .x_neg(xn), .y_pos(yp), .y_neg(yn), .s_pos(sp), .s_neg(sn));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint ev, gv;
      if (t < 4) begin
        // extremes: all digits +1 or all -1
        xp = (t[0]) ? '1 : '0; xn = (t[0]) ? '0 : '1;
        yp = (t[1]) ? '1 : '0; yn = (t[1]) ? '0 : '1;
      end else begin
        xp = N'($urandom); xn = N'($urandom);
        yp = N'($urandom); yn = N'($urandom);
      end
      #1;
      ev = longint'(xp) - longint'(xn) + longint'(yp) - longint'(yn);
      gv = longint'(sp) - longint'(sn);
      checks++;
      if (gv !== ev) begin
        failures++;
        if (failures < 10) $display("mismatch: x=%h/%h y=%h/%h got %0d expected %0d", xp, xn, yp, yn, gv, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
