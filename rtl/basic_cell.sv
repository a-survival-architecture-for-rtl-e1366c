// basic_cell: working cell (FC) or spare cell (SC) of the survival array.
//
// FC and SC are the same hardware; the role flag R1111 of the gene word says
// which one a cell is. A cell holds
//   - the gene memory (16 flags: good results, function flags, life, role),
//   - the function module, computing the cell's 1-bit result from a 2-bit input,
//   - the self-checking module (SCM), which checks each result against the
//     good-result flags and broadcasts the 2-bit survival codes to N, S, E, W,
//   - the self-repairing module (SRM), active only while the cell is a live,
//     healthy spare: it watches the neighbours' codes and, when one fails,
//     clones that neighbour's genes and takes over its work.
// The gene word is offered to all four neighbours (the 16-bit buses of the
// SRM), so a spare can copy it.
//
// Data: a working FC computes on its own primary input pin. A spare that has
// replaced a neighbour computes on that neighbour's input, taken from nbr_pin.
//
// Timing: the function, the check and the codes are combinational; the genes
// and the repair state change on the rising clock edge. Reset is asynchronous
// and active low, and clears the genes, so every cell is dead until it has
// been downloaded. repair_en must stay 0 during the download.
//
// The block structure follows the document; the port-level interface and the
// fault_inj test input (inverts the function output to model a defect) are
// this design's.
module basic_cell
  import survival_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              repair_en,
  // initial download from the host
  input  logic              cfg_we,
  input  logic [GENE_W-1:0] cfg_gene,
  // data path
  input  logic [1:0]        pin,
  input  logic [1:0]        nbr_pin [4],
  output logic              pout,
  input  logic              fault_inj,
  // survival codes
  output logic [7:0]        tx_code,
  input  logic [7:0]        rx_code,
  // gene buses
  output logic [GENE_W-1:0] gene_out,
  input  logic [GENE_W-1:0] nbr_gene [4],
  // coordination with the other spares and the routing cells
  input  logic [3:0]        peer_claim,
  output logic [3:0]        primary_claim,
  output logic [3:0]        taken,
  output logic              cell_ok,
  output logic [3:0]        nbr_fault,    // per-side fault seen by the comparator
  output logic              nbr_alarm     // any neighbour faulty
);

  logic [GENE_W-1:0] gene;
  logic              rep_we;
  logic [GENE_W-1:0] rep_data;
  logic [1:0]        fin;
  logic              fout;
  logic              spare;
  logic              active;
  dir_e              taken_dir;

  gene_memory #(.WIDTH(GENE_W)) u_genes (
    .clk, .rst_n,
    .cfg_we, .cfg_data(cfg_gene),
    .rep_we, .rep_data,
    .q(gene)
  );

  assign fin = active ? nbr_pin[taken_dir] : pin;

  function_module u_func (
    .in(fin),
    .func_flags(gene[G_FUNC_LSB +: NUM_FUNC]),
    .fault_inj,
    .out(fout)
  );

  scm u_scm (
    .in(fin),
    .good(gene[G_GOOD_LSB +: 4]),
    .life(gene[G_LIFE]),
    .func_out(fout),
    .ok(cell_ok),
    .tx_code
  );

  assign spare = !gene[G_ROLE] && cell_ok;

  srm u_srm (
    .clk, .rst_n, .repair_en,
    .spare,
    .rx_code,
    .peer_claim,
    .nbr_gene,
    .fault(nbr_fault),
    .any_fault(nbr_alarm),
    .primary_claim,
    .taken,
    .active,
    .taken_dir,
    .rep_we,
    .rep_data
  );

  assign pout     = fout;
  assign gene_out = gene;

endmodule
