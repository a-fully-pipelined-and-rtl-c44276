// sys_bus: system bus from the GDTUs of all PE clusters to the off-chip memory port
//
// Every cluster's GDTU issues one-word memory requests (valid/ready). The bus grants
// one request per cycle, round robin over the clusters, and forwards it to the I/O
// interface toward the off-chip DRAM, replacing the upper bits of the request tag by
// the cluster number (the GDTU fills the lower CH_W bits with its channel). Read
// responses come back in order with the tag; the bus routes each to the cluster named
// in it, where the GDTU routes it on to the channel. Responses cannot be refused.
// When the memory withholds dram_req_ready, every requester stalls. The round-robin
// word-level protocol is this design's choice.
module sys_bus
  import fpca_pkg::*;
#(
  parameter int unsigned NCL = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic     [NCL-1:0]   cl_req_valid,
  input  mem_req_t [NCL-1:0]   cl_req,
  output logic     [NCL-1:0]   cl_req_ready,
  output logic     [NCL-1:0]   cl_rsp_valid,
  output mem_rsp_t [NCL-1:0]   cl_rsp,
  output logic                 dram_req_valid,
  output mem_req_t             dram_req,
  input  logic                 dram_req_ready,
  input  logic                 dram_rsp_valid,
  input  mem_rsp_t             dram_rsp
);

  localparam int unsigned CLW = TAG_W - CH_W;

  logic [NCL-1:0][$bits(mem_req_t)-1:0] pkt;
  logic [$bits(mem_req_t)-1:0]          out;

  always_comb begin
    for (int i = 0; i < int'(NCL); i++) begin
      mem_req_t r;
      r = cl_req[i];
      r.tag = {CLW'(i), cl_req[i].tag[CH_W-1:0]};
      pkt[i] = r;
    end
  end

  rr_arb_mux #(.N(NCL), .W($bits(mem_req_t))) u_arb (
    .clk, .rst_n, .in_valid(cl_req_valid), .in_data(pkt), .in_ready(cl_req_ready),
    .out_valid(dram_req_valid), .out_data(out), .out_ready(dram_req_ready)
  );
  assign dram_req = mem_req_t'(out);

  always_comb begin
    for (int i = 0; i < int'(NCL); i++) begin
      cl_rsp[i]       = dram_rsp;
      cl_rsp_valid[i] = dram_rsp_valid && (int'(dram_rsp.tag[TAG_W-1:CH_W]) == i);
    end
  end

endmodule
