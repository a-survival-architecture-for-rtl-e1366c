// gene_memory: the register file that holds a cell's genes.
//
// WIDTH one-bit flags R0..R(WIDTH-1) kept in flip-flops. A working or spare
// cell holds 16 flags (R0000..R1111); a routing cell holds half as many. The
// flags are written as a whole word, either by the initial download from the
// host (cfg_we) or by the cell's self-repairing module when it clones a faulty
// neighbour (rep_we). The download wins if both write in the same cycle. All
// flags are read in parallel on q, with no read latency.
//
// The word-wide write port and the priority of the download are this design's
// choice; the document gives only the flags and their meaning. Reset clears
// every flag, which leaves the cell dead (life flag 0) until it is configured.
module gene_memory #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_we,    // initial download
  input  logic [WIDTH-1:0] cfg_data,
  input  logic             rep_we,    // write from the self-repairing module
  input  logic [WIDTH-1:0] rep_data,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (cfg_we) q <= cfg_data;
    else if (rep_we) q <= rep_data;
  end

endmodule
