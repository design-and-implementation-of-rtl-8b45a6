// tb_alu: self-checking test of the ALU.
// Drives every operation with corner and random operands and compares the result and
// the Z, C, B, P flags with a reference computed here in wider arithmetic.
module tb_alu;
  import risc_pkg::*;
  localparam int W = 8;
  logic [W-1:0] a, b, y;
  alu_op_e op;
  flags_t fl;
  int checks = 0, failures = 0;

  alu #(.DATA_W(W)) dut (.a, .b, .op, .y, .flags(fl));

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_, input alu_op_e top);
    int ey, ec, eb;
    a = ta; b = tb_; op = top;
    #1;
    ec = 0; eb = 0;
    case (top)
      ALU_ADD: begin ey = (int'(ta) + int'(tb_)) % 256; ec = (int'(ta) + int'(tb_)) > 255; end
      ALU_SUB: begin ey = (int'(ta) - int'(tb_) + 256) % 256; eb = int'(ta) < int'(tb_); end
      ALU_AND: ey = int'(ta & tb_);
      ALU_OR:  ey = int'(ta | tb_);
      ALU_XOR: ey = int'(ta ^ tb_);
      default: ey = ($signed(ta) < $signed(tb_)) ? 1 : 0;
    endcase
    checks++;
    if (int'(y) != ey || fl.c != ec[0] || fl.b != eb[0] || fl.z != (ey == 0) || fl.p != ^(ey[7:0])) begin
      failures++;
      $display("FAIL op=%0d a=%0d b=%0d y=%0d exp=%0d flags=%b", top, ta, tb_, y, ey, fl);
    end
  endtask

  initial begin
    alu_op_e ops [6] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT};
    foreach (ops[k]) begin
      check_one(8'h00, 8'h00, ops[k]);
      check_one(8'hFF, 8'h01, ops[k]);
      check_one(8'h01, 8'hFF, ops[k]);
      check_one(8'h80, 8'h7F, ops[k]);
      check_one(8'h7F, 8'h80, ops[k]);
      for (int i = 0; i < 200; i++) check_one(W'($urandom), W'($urandom), ops[k]);
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
