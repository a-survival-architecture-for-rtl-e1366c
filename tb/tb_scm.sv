// tb_scm: self-checking test of the self-checking module.
// Exhaustive over input, good-result flags, life flag and function output.
// Expected: ok when the cell is alive and the output equals the good result
// the input selects; healthy codes 11 (N) 00 (S) 10 (E) 01 (W), and the
// complement of each when not ok.
module tb_scm;
  logic clk = 1'b0;
  logic [1:0] in;
  logic [3:0] good;
  logic life, func_out, ok;
  logic [7:0] tx_code;
  int checks = 0, failures = 0;

  scm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++)
      for (int g = 0; g < 16; g++)
        for (int l = 0; l < 2; l++)
          for (int o = 0; o < 2; o++) begin
            logic e_ok;
            logic [7:0] e_code;
            in = 2'(v); good = 4'(g); life = 1'(l); func_out = 1'(o);
            #1;
            e_ok   = (l == 1) && (((g >> v) & 1) == o);
            e_code = e_ok ? {2'b11, 2'b00, 2'b10, 2'b01} : {2'b00, 2'b11, 2'b01, 2'b10};
            checks += 2;
            if (ok !== e_ok) begin
              failures++;
              $display("FAIL ok: in=%b good=%b life=%b out=%b ok=%b", in, good, life, func_out, ok);
            end
            if (tx_code !== e_code) begin
              failures++;
              $display("FAIL code: in=%b good=%b life=%b out=%b code=%b", in, good, life, func_out, tx_code);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
