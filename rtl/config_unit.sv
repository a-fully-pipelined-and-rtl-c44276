// config_unit: configuration unit of a PE cluster
//
// Holds the constant configuration bits of every module in the cluster (CE node
// settings, register-chain taps, LMU access patterns and countdowns, the permutation
// network's switch settings, the GDTU channel set-up) once an accelerator has been
// composed into the cluster. The bits form the packed struct cluster_cfg_t and are
// written as 32-bit words through the controller: word w holds bits [32w+31:32w].
// Writing a word takes effect on the next clock edge; the stored bits drive the
// modules directly and stay constant while the accelerator runs. Reset clears all
// bits, which leaves every LMU and channel disabled. The word-serial write port and
// the read-back port are this design's choices.
module config_unit
  import fpca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [CFG_AW-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  output cluster_cfg_t      cfg
);

  logic [CFG_WORDS-1:0][31:0] words;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) words <= '0;
    else if (we && int'(addr) < int'(CFG_WORDS)) words[addr] <= wdata;
  end

  assign rdata = (int'(addr) < int'(CFG_WORDS)) ? words[addr] : '0;
  assign cfg   = cluster_cfg_t'(words[CFG_WORDS-1:0]);

endmodule
