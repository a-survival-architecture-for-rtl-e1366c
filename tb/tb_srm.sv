// tb_srm: self-checking test of the self-repairing module.
// Drives the received survival codes of the four neighbours and checks
//   - the parallel comparator (per-side fault bits and their OR),
//   - that nothing happens while repair is disabled or the cell is not a spare,
//   - the priority: south and west on the spare's own authority, north and
//     east only when the far-side spare has not claimed the cell,
//   - the gene copy: written exactly one cycle after the choice, with life
//     and role set, and the choice held afterwards (two edges fault to active).
module tb_srm;
  import survival_pkg::*;
  logic clk = 1'b0, rst_n;
  logic repair_en, spare;
  logic [7:0] rx_code;
  logic [3:0] peer_claim;
  logic [GENE_W-1:0] nbr_gene [4];
  logic [3:0] fault, primary_claim, taken;
  logic any_fault, active, rep_we;
  dir_e taken_dir;
  logic [GENE_W-1:0] rep_data;
  int checks = 0, failures = 0;
  // One bit per side, bit index = direction number (N=0, S=1, E=2, W=3)
  localparam logic [3:0] MN = 4'b0001, MS = 4'b0010, ME = 4'b0100, MW = 4'b1000;

  srm dut (.*);

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

  // Received code word with a wrong code on the sides set in bad
  function automatic logic [7:0] codes(logic [3:0] bad);
    logic [7:0] w = 8'b00110110;
    for (int d = 0; d < 4; d++) if (bad[d]) w[7-2*d -: 2] = ~w[7-2*d -: 2];
    return w;
  endfunction

  task automatic restart();
    @(negedge clk);
    rst_n = 1'b0; rx_code = codes(4'b0000); peer_claim = '0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Expect the spare to choose side d: claim/taken/rep_we sequence and copy
  task automatic expect_repair(int d, string what);
    logic [GENE_W-1:0] e_gene;
    e_gene = nbr_gene[d] | 16'hC000;
    @(posedge clk); #1;
    chk(active && taken == 4'(1 << d), {what, ": taken after one edge"});
    chk(rep_we && rep_data == e_gene, {what, ": gene copy in second cycle"});
    @(posedge clk); #1;
    chk(active && !rep_we && taken == 4'(1 << d), {what, ": held after copy"});
    chk(primary_claim == 4'b0000, {what, ": no new claim once active"});
    @(posedge clk); #1;
    chk(!rep_we && taken == 4'(1 << d), {what, ": still held"});
  endtask

  task automatic expect_idle(string what);
    repeat (3) begin
      @(posedge clk); #1;
      chk(!active && !rep_we && taken == '0, what);
    end
  endtask

  initial begin
    rst_n = 1'b0; repair_en = 1'b0; spare = 1'b1; rx_code = codes(4'b0000);
    peer_claim = '0;
    for (int d = 0; d < 4; d++) nbr_gene[d] = 16'h0101 * (d + 1) ^ 16'h2C30;
    #1; rst_n = 1'b1;

    // Comparator, all 16 fault patterns
    for (int b = 0; b < 16; b++) begin
      rx_code = codes(4'(b)); #1;
      chk(fault == 4'(b) && any_fault == (b != 0), "comparator");
    end
    rx_code = 8'b11001001; #1;   // a sender's own code word is wrong everywhere
    chk(fault == 4'b1111, "comparator, unswapped word");
    rx_code = codes(4'b0000); #1;
    chk(!any_fault && primary_claim == '0, "normal: primary output 0");

    // Repair disabled during download
    rx_code = codes(MS); #1;
    chk(primary_claim == '0, "no claim while repair disabled");
    expect_idle("no repair while disabled");

    // Not a spare
    repair_en = 1'b1; spare = 1'b0; #1;
    chk(primary_claim == '0, "no claim when not a spare");
    expect_idle("no repair when not a spare");

    // South fault: primary
    restart(); spare = 1'b1; rx_code = codes(MS); #1;
    chk(primary_claim == MS, "primary claim south");
    expect_repair(DIR_S, "south");

    // West fault: primary
    restart(); rx_code = codes(MW); #1;
    chk(primary_claim == MW, "primary claim west");
    expect_repair(DIR_W, "west");

    // North fault claimed by the far-side spare: stay out
    restart(); rx_code = codes(MN); peer_claim = MN; #1;
    chk(primary_claim == '0, "north is never a primary claim");
    expect_idle("north left to the prior spare");
    // ... then the prior spare gives up: take it
    @(negedge clk); peer_claim = 4'b0000;
    expect_repair(DIR_N, "north as secondary");

    // East fault, free
    restart(); rx_code = codes(ME);
    expect_repair(DIR_E, "east as secondary");
    // East fault claimed by the far side
    restart(); rx_code = codes(ME); peer_claim = ME;
    expect_idle("east left to the prior spare");

    // Several faults at once: S before W before N before E
    restart(); rx_code = codes(4'b1111);
    expect_repair(DIR_S, "all four faulty");
    restart(); rx_code = codes(MN | ME | MW);
    expect_repair(DIR_W, "N, E and W faulty");
    restart(); rx_code = codes(MN | ME); peer_claim = MN;
    expect_repair(DIR_E, "N claimed by peer, E free");

    // A later fault does not move an active spare
    restart(); rx_code = codes(ME);
    expect_repair(DIR_E, "first repair");
    @(negedge clk); rx_code = codes(ME | MS);
    expect_idle_keep: begin
      @(posedge clk); #1;
      chk(taken == ME && !rep_we, "active spare ignores a new fault");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
