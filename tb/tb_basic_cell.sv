// tb_basic_cell: self-checking test of one FC/SC cell.
// As a working cell: every function on every input, the survival codes it
// sends, and the fault codes when its result is made wrong or it is dead.
// As a spare: a neighbour's fault code makes it copy that neighbour's genes
// (life and role set), compute the neighbour's function on the neighbour's
// input two clock edges later, and then ignore further fault codes. A spare
// whose own check fails does not repair.
module tb_basic_cell;
  import survival_pkg::*;
  logic clk = 1'b0, rst_n;
  logic repair_en, cfg_we, fault_inj, pout, cell_ok, nbr_alarm;
  logic [GENE_W-1:0] cfg_gene, gene_out;
  logic [GENE_W-1:0] nbr_gene [4];
  logic [1:0] pin;
  logic [1:0] nbr_pin [4];
  logic [7:0] tx_code, rx_code;
  logic [3:0] peer_claim, primary_claim, taken, nbr_fault;
  int checks = 0, failures = 0;

  localparam logic [3:0] TT [NUM_FUNC] = '{
    4'b1000, 4'b1110, 4'b0111, 4'b0001, 4'b0110,
    4'b1001, 4'b1000, 4'b0010, 4'b0101, 4'b1010
  };
  localparam logic [7:0] HEALTHY_TX = 8'b11_00_10_01;

  basic_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic [GENE_W-1:0] fc_gene(int f);
    // role 1, life 1, one function flag, good results = its truth table
    return {1'b1, 1'b1, 10'(1 << f), TT[f]};
  endfunction

  task automatic download(logic [GENE_W-1:0] g);
    @(negedge clk); cfg_we = 1; cfg_gene = g;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    rst_n = 1'b0; repair_en = 1'b0; cfg_we = 0; cfg_gene = '0; fault_inj = 0;
    pin = '0; rx_code = 8'b00110110; peer_claim = '0;
    for (int d = 0; d < 4; d++) begin nbr_gene[d] = '0; nbr_pin[d] = '0; end
    #1;
    chk(!cell_ok && tx_code == ~HEALTHY_TX, "dead after reset");
    rst_n = 1'b1;

    // Working cell: all functions
    for (int f = 0; f < NUM_FUNC; f++) begin
      download(fc_gene(f));
      chk(gene_out == fc_gene(f), "genes offered to neighbours");
      for (int v = 0; v < 4; v++) begin
        pin = 2'(v); fault_inj = 0; #1;
        chk(pout == TT[f][v] && cell_ok && tx_code == HEALTHY_TX, "FC result and healthy codes");
        fault_inj = 1; #1;
        chk(pout != TT[f][v] && !cell_ok && tx_code == ~HEALTHY_TX, "FC fault codes");
      end
    end
    fault_inj = 0;
    download(fc_gene(0) & ~16'h4000);
    chk(!cell_ok && tx_code == ~HEALTHY_TX, "dead FC sends fault codes");

    // A working cell does not repair
    download(fc_gene(1));
    repair_en = 1'b1; rx_code = 8'b11_11_01_10;   // north neighbour faulty
    repeat (3) @(posedge clk); #1;
    chk(taken == '0 && gene_out == fc_gene(1), "FC ignores neighbour faults");
    chk(nbr_alarm && nbr_fault == 4'b0001, "FC still sees the neighbour fault");

    // Spare whose own check fails: no repair
    repair_en = 1'b0; rx_code = 8'b00110110;
    download(16'h4000);             // alive spare, no function
    fault_inj = 1;
    repair_en = 1'b1; rx_code = 8'b00_00_01_10;   // south neighbour faulty
    repeat (3) @(posedge clk); #1;
    chk(taken == '0, "faulty spare does not repair");
    fault_inj = 0;
    rst_n = 1'b0; #1; rst_n = 1'b1;

    // Healthy spare repairs its west neighbour (an XOR cell)
    repair_en = 1'b0; rx_code = 8'b00110110;
    download(16'h4000);
    chk(cell_ok && tx_code == HEALTHY_TX, "idle spare is healthy");
    nbr_gene[DIR_W] = fc_gene(4);
    nbr_gene[DIR_S] = fc_gene(0);
    nbr_pin[DIR_W]  = 2'b01;
    @(negedge clk); repair_en = 1'b1; rx_code = 8'b00_11_01_01;   // west faulty
    #1;
    chk(primary_claim == 4'b1000, "spare claims the west cell");
    @(posedge clk); #1;
    chk(taken == 4'b1000, "taken after one edge");
    @(posedge clk); #1;
    chk(gene_out == fc_gene(4), "genes copied after two edges");
    for (int v = 0; v < 4; v++) begin
      nbr_pin[DIR_W] = 2'(v); pin = 2'(v) ^ 2'b01; #1;
      chk(pout == TT[4][v] && cell_ok && tx_code == HEALTHY_TX, "spare computes on the west input");
    end
    // The repaired spare is now a working cell
    @(negedge clk); rx_code = 8'b11_00_01_01;
    repeat (3) @(posedge clk); #1;
    chk(taken == 4'b1000 && gene_out == fc_gene(4), "repaired spare ignores new faults");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
