// tb_accumulator: self-checking test of the accumulator.
// Random loads and unary operations (inc, dec, complement, rotate right/left) are
// applied; after each clock the register and the combinational result are compared
// with a reference model kept in the testbench.
module tb_accumulator;
  import risc_pkg::*;
  localparam int W = 8;
  logic clk = 0, rst = 1, load = 0;
  logic [W-1:0] din = 0, acc, result;
  acc_op_e op = ACC_NONE;
  logic z, p;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  accumulator #(.DATA_W(W)) dut (.clk, .rst, .load, .din, .op, .acc, .result, .z, .p);
  always #5 clk = ~clk;

  function automatic logic [W-1:0] apply(input logic [W-1:0] v, input acc_op_e o);
    case (o)
      ACC_INC: return v + 1;
      ACC_DEC: return v - 1;
      ACC_CPL: return ~v;
      ACC_ROR: return {v[0], v[W-1:1]};
      ACC_ROL: return {v[W-2:0], v[W-1]};
      default: return v;
    endcase
  endfunction

  initial begin
    acc_op_e ops [6] = '{ACC_NONE, ACC_INC, ACC_DEC, ACC_CPL, ACC_ROR, ACC_ROL};
    repeat (2) @(posedge clk);
    #1 rst = 0; model = 0;
    checks++; if (acc !== 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 400; i++) begin
      load = 1'($urandom);
      din  = W'($urandom);
      op   = ops[$urandom % 6];
      if (i % 7 == 0) op = ACC_INC;
      #1;
      checks++;
      if (result !== apply(model, op) || z !== (apply(model, op) == 0) || p !== ^apply(model, op)) begin
        failures++; $display("FAIL comb op=%0d acc=%h result=%h", op, model, result);
      end
      @(posedge clk);
      if (op != ACC_NONE) model = apply(model, op);
      else if (load) model = din;
      #1;
      checks++;
      if (acc !== model) begin failures++; $display("FAIL acc=%h exp=%h", acc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
