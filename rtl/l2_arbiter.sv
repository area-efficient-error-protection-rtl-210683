// l2_arbiter: the address multiplexer in front of the L2 set decoder.
//
// Two requesters share the cache arrays: the L1 caches (through the request
// port) and the cleaning logic. When the cache controller is free (free_i),
// an L1 request wins over a cleaning request, as the document prescribes,
// since it is on the processor's critical path; a cleaning request is served
// only when no L1 request is present. set_o is the set index routed to the
// arrays. deferred_o marks a cycle in which the cleaning request lost.
// Combinational.
module l2_arbiter #(
  parameter int unsigned SETS = 4096
) (
  input  logic                    free_i,
  input  logic                    l1_valid_i,
  input  logic [$clog2(SETS)-1:0] l1_set_i,
  input  logic                    clean_req_i,
  input  logic [$clog2(SETS)-1:0] clean_set_i,
  output logic                    grant_l1_o,
  output logic                    grant_clean_o,
  output logic                    deferred_o,
  output logic [$clog2(SETS)-1:0] set_o
);

  always_comb begin
    grant_l1_o    = free_i & l1_valid_i;
    grant_clean_o = free_i & clean_req_i & ~l1_valid_i;
    deferred_o    = free_i & clean_req_i & l1_valid_i;
    set_o         = grant_clean_o ? clean_set_i : l1_set_i;
  end

endmodule
