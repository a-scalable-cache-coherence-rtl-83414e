// sc_multiproc: the processor caches of a shared-memory multiprocessor.
//
// NPROC selectively clearable caches side by side, one per processor. Each
// cache's processor port and its memory port are brought out: the processors
// and the interconnection network that joins the memory ports to the shared
// memory modules lie outside this design, and the coherence scheme asks
// nothing of the network (no snooping, no broadcast), so any network will do.
// Coherence comes from software: a program takes a lock, makes the shared
// structure coherent in its own cache (OP_COHERE) and then reads it; shared
// stores are written through to memory (or, with SHARED_WB = 1, written
// back and flushed by OP_RELEASE before the unlock).
//
// NPROC = 4 is this design's choice; the scheme does not depend on it.
module sc_multiproc
  import sc_pkg::*;
#(
  parameter int NPROC      = 4,
  parameter int WAYS       = 4,
  parameter int NSETS      = 512,
  parameter bit WRITE_BACK = 1'b1,
  parameter bit DCL        = 1'b1,
  parameter bit SHARED_WB  = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cpu_req_t cpu_req [NPROC],
  output cpu_rsp_t cpu_rsp [NPROC],
  output mem_req_t mem_req [NPROC],
  input  mem_rsp_t mem_rsp [NPROC]
);

  for (genvar p = 0; p < NPROC; p++) begin : g_node
    sc_cache #(.WAYS(WAYS), .NSETS(NSETS), .WRITE_BACK(WRITE_BACK), .DCL(DCL), .SHARED_WB(SHARED_WB)) u_cache (
      .clk, .rst_n,
      .cpu_req (cpu_req[p]),
      .cpu_rsp (cpu_rsp[p]),
      .mem_req (mem_req[p]),
      .mem_rsp (mem_rsp[p])
    );
  end

endmodule
