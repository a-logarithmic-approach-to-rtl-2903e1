// tb_lns_control: exhaustive test of the ALU control decoder against the
// control table (minus, mux, sub1, sub2 per operation), the operand swap rule
// and the result sign rule, all 32 combinations of op, Sx, Sy and Lx > Ly.
module tb_lns_control;
  import lns_pkg::*;
  int checks = 0, failures = 0;

  lns_op_e   op;
  logic      sx, sy, gt, swap, sz;
  alu_ctrl_t ctrl;

  lns_control dut (.op(op), .sx(sx), .sy(sy), .gt(gt), .ctrl(ctrl), .swap(swap), .sz(sz));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 4; o++)
      for (int s = 0; s < 8; s++) begin
        logic [3:0] exp_c;  // minus mux sub1 sub2
        logic       exp_swap, exp_sz, ysgn;
        op = lns_op_e'(o); sx = s[2]; sy = s[1]; gt = s[0];
        #1;
        ysgn = (o == 1) ? !sy : sy;
        case (o)
          0, 1:    begin exp_c = {sx != ysgn, 3'b010}; exp_swap = !gt; exp_sz = gt ? sx : ysgn; end
          2:       begin exp_c = 4'b0101; exp_swap = 1'b0; exp_sz = sx ^ sy; end
          default: begin exp_c = 4'b0110; exp_swap = 1'b0; exp_sz = sx ^ sy; end
        endcase
        checks++;
        if ({ctrl.minus, ctrl.mux, ctrl.sub1, ctrl.sub2} != exp_c || swap != exp_swap || sz != exp_sz) begin
          failures++;
          $display("FAIL op=%0d sx=%b sy=%b gt=%b ctrl=%b exp=%b swap=%b sz=%b", o, sx, sy, gt,
                   ctrl, exp_c, swap, sz);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
