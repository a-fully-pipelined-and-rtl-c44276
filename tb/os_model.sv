// os_model: behavioural model of the operating system's page-table service for
// IOMMU TLB misses (testbench only). Answers a miss after DELAY cycles with the
// physical page number ppn_of(vpn), a fixed scrambled mapping.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module os_model
  import fpca_pkg::*;
#(
  parameter int DELAY = 20
) (
  input  logic                        clk,
  input  logic                        miss_valid,
  input  logic [VA_W-PAGE_LOG2-1:0]   miss_vpn,
  output logic                        fill_valid,
  output logic [VA_W-PAGE_LOG2-1:0]   fill_ppn
);
  int cnt = 0;
  int unsigned served = 0;

  function automatic logic [VA_W-PAGE_LOG2-1:0] ppn_of(logic [VA_W-PAGE_LOG2-1:0] v);
    return (v ^ 22'h000_2A5) + 22'h000_400;
  endfunction

  initial fill_valid = 1'b0;
  always @(posedge clk) begin
    fill_valid <= 1'b0;
    if (miss_valid && !fill_valid) begin
      cnt++;
      if (cnt >= DELAY) begin
        fill_valid <= 1'b1;
        fill_ppn   <= ppn_of(miss_vpn);
        served++;
        cnt = 0;
      end
    end
  end
endmodule
