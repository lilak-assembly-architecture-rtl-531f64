// tb_control_unit: checks the control word of every opcode against a table
// written out by hand from the instruction semantics, including the control
// values expected for "set".
module tb_control_unit;
  import lilak_pkg::*;
  logic [3:0] op;
  ctrl_t      ctrl;
  int         checks = 0, failures = 0;

  control_unit dut (.op(op), .ctrl(ctrl));

  // Expected: {reg_write, reg_dest, reg_data, pc_src, branch, mem_to_reg,
  //            mem_read, mem_write, alu_src_a, alu_src_b}, and alu_op.
  function automatic logic [10:0] expect_bits(int o);
    case (o)
      0, 1, 2, 3, 4, 5, 6, 8, 9: return 11'b1_0_0_0_0_01_0_0_0_0;
      7:  return 11'b1_0_0_0_0_00_0_0_0_0;   // set
      10: return 11'b0_0_0_1_0_00_0_0_0_0;   // jump
      11: return 11'b0_0_0_0_0_00_0_1_0_0;   // store
      12: return 11'b1_0_0_0_0_10_1_0_0_0;   // load
      13: return 11'b0_0_0_0_1_00_0_0_1_1;   // branch on equal
      14: return 11'b1_1_1_1_0_00_0_0_0_0;   // jump and link
      default: return 11'b0;
    endcase
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++) begin
      logic [10:0] got;
      logic [3:0]  exp_alu;
      op = 4'(o);
      #1;
      got = {ctrl.reg_write, ctrl.reg_dest, ctrl.reg_data, ctrl.pc_src, ctrl.branch,
             2'(ctrl.mem_to_reg), ctrl.mem_read, ctrl.mem_write, ctrl.alu_src_a, ctrl.alu_src_b};
      exp_alu = (o <= 6 || o == 8 || o == 9) ? 4'(o) : 4'd0;
      checks++;
      if (got !== expect_bits(o) || 4'(ctrl.alu_op) !== exp_alu) begin
        failures++;
        $display("FAIL op=%0d got %b alu=%0d exp %b alu=%0d", o, got, ctrl.alu_op, expect_bits(o), exp_alu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
