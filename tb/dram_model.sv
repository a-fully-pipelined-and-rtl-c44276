// dram_model: behavioural model of the off-chip DRAM behind the I/O interface
// (testbench only, not synthesizable). Accepts one-word requests when ready; ready is
// withheld at random in STALL_PCT percent of the cycles to model a memory kept busy by
// other devices. Read data returns in order LATENCY cycles later with the request's
// tag. Memory is sparse; a word never written reads as init_val(addr).
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module dram_model
  import fpca_pkg::*;
#(
  parameter int LATENCY   = 6,
  parameter int STALL_PCT = 10
) (
  input  logic     clk,
  input  logic     req_valid,
  input  mem_req_t req,
  output logic     req_ready,
  output logic     rsp_valid,
  output mem_rsp_t rsp
);

  logic [31:0] mem [logic [31:0]];
  int unsigned reads = 0, writes = 0, stalls = 0;

  typedef struct { int due; mem_rsp_t r; } pend_t;
  pend_t pq[$];
  int cyc = 0;

  function automatic logic [31:0] init_val(logic [31:0] a);
    return a * 32'h9E37_79B1 ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [31:0] peek(logic [31:0] a);
    return mem.exists(a) ? mem[a] : init_val(a);
  endfunction

  task automatic poke(logic [31:0] a, logic [31:0] d);
    mem[a] = d;
  endtask

  initial begin
    req_ready = 1'b1;
    rsp_valid = 1'b0;
    rsp = '0;
  end

  always @(posedge clk) begin
    cyc++;
    if (req_valid && req_ready) begin
      if (req.we) begin
        mem[req.addr] = req.wdata;
        writes++;
      end else begin
        pend_t p;
        p.due = cyc + LATENCY;
        p.r.tag = req.tag;
        p.r.rdata = peek(req.addr);
        pq.push_back(p);
        reads++;
      end
    end
    if (pq.size() > 0 && pq[0].due <= cyc) begin
      rsp_valid <= 1'b1;
      rsp <= pq[0].r;
      void'(pq.pop_front());
    end else rsp_valid <= 1'b0;
    req_ready <= ($urandom_range(99, 0) >= STALL_PCT);
    if (req_valid && !req_ready) stalls++;
  end
endmodule
