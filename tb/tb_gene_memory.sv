// tb_gene_memory: self-checking test of the gene register file.
// Checks reset to zero, the download write, the repair write, the download's
// priority when both write, and that the word holds when neither writes,
// against a reference word kept by the testbench. Random data, 16-bit default.
module tb_gene_memory;
  localparam int unsigned W = 16;
  logic clk = 1'b0, rst_n;
  logic cfg_we, rep_we;
  logic [W-1:0] cfg_data, rep_data, q, ref_q;
  int checks = 0, failures = 0;

  gene_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== ref_q) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, ref_q);
    end
  endtask

  initial begin
    rst_n = 1'b0; cfg_we = 0; rep_we = 0; cfg_data = '0; rep_data = '0;
    #1; ref_q = '0; check("async reset");
    @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      cfg_we   = ($urandom_range(0, 3) == 0);
      rep_we   = ($urandom_range(0, 2) == 0);
      cfg_data = W'($urandom);
      rep_data = W'($urandom);
      if (cfg_we)      ref_q = cfg_data;
      else if (rep_we) ref_q = rep_data;
      @(posedge clk); #1;
      check(cfg_we ? "download" : rep_we ? "repair write" : "hold");
    end
    // both at once: download wins
    @(negedge clk); cfg_we = 1; rep_we = 1; cfg_data = 16'hA5C3; rep_data = 16'h1234;
    ref_q = 16'hA5C3;
    @(posedge clk); #1; check("download priority");
    @(negedge clk); cfg_we = 0; rep_we = 0;
    rst_n = 1'b0; #1; ref_q = '0; check("reset after use");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
