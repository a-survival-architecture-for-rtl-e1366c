// tb_function_module: self-checking test of the cell's function module.
// Every function flag alone is tried on all four inputs and compared with the
// truth table written out below (index {in[1],in[0]}); then random flag sets
// check lowest-flag priority, no flag gives 0, and fault_inj inverts.
module tb_function_module;
  import survival_pkg::*;
  logic clk = 1'b0;
  logic [1:0] in;
  logic [NUM_FUNC-1:0] func_flags;
  logic fault_inj, out;
  int checks = 0, failures = 0;

  // Truth tables: bit k is the output for input k = {a, b}
  localparam logic [3:0] TT [NUM_FUNC] = '{
    4'b1000,  // AND
    4'b1110,  // OR
    4'b0111,  // NAND
    4'b0001,  // NOR
    4'b0110,  // XOR
    4'b1001,  // XNOR
    4'b1000,  // ADD carry
    4'b0010,  // SUB borrow: a=0,b=1
    4'b0101,  // INV of b
    4'b1010   // BUF of b
  };

  function_module dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(logic e, string what);
    #1;
    checks++;
    if (out !== e) begin
      failures++;
      $display("FAIL %s: flags=%b in=%b out=%b expected %b", what, func_flags, in, out, e);
    end
  endtask

  initial begin
    fault_inj = 1'b0;
    for (int f = 0; f < NUM_FUNC; f++)
      for (int v = 0; v < 4; v++) begin
        func_flags = '0; func_flags[f] = 1'b1; in = 2'(v);
        expect_out(TT[f][v], "one-hot function");
      end
    func_flags = '0;
    for (int v = 0; v < 4; v++) begin in = 2'(v); expect_out(1'b0, "no function"); end
    for (int n = 0; n < 300; n++) begin
      int lo;
      func_flags = NUM_FUNC'($urandom);
      in         = 2'($urandom);
      fault_inj  = 1'($urandom);
      lo = -1;
      for (int k = NUM_FUNC - 1; k >= 0; k--) if (func_flags[k]) lo = k;
      expect_out(((lo < 0) ? 1'b0 : TT[lo][in]) ^ fault_inj, "random flags");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
