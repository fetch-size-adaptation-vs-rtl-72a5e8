// locality_detector: spatial locality detection of the adaptive-fetch-size
// cache. Purely combinational; the cache samples `good` during the cycle in
// which the tags of the neighbouring VCL are on the tag-array outputs, and
// `poor` during the cycle in which it picks the victim of a miss-fetch.
//
// Good locality: the VCL being fetched and its neighbour (the other half of
// the VCL of twice the fetch size) hold the same tag. The neighbour starts at
// PCL index base XOR 2^V; its tags in all ways are compared with the tag of
// the missing address, and a match in any valid way counts.
//
// Poor locality: the VCL that the miss-fetch replaces (the 2^V PCLs of the
// victim way starting at the base index) has its first half or its second
// half unused. A PCL counts as used when it is valid and was referenced since
// it was filled. A VCL of one PCL has no halves and is never poor, and a range
// holding no valid PCL replaces nothing and is not counted.
module locality_detector #(
  parameter int unsigned WAYS  = 4,
  parameter int unsigned TAG_W = 20,
  parameter int unsigned MAXP  = 4                  // PCLs in the largest VCL
) (
  input  afs_pkg::fsz_t    fsz,                     // V: log2 of PCLs per VCL
  input  logic [TAG_W-1:0] req_tag,                 // tag of the missing address
  input  logic [TAG_W-1:0] nbr_tag   [WAYS],        // tags at the neighbour's first PCL
  input  logic [WAYS-1:0]  nbr_valid,
  input  logic [MAXP-1:0]  victim_valid,            // bit k: PCL base+k of the victim way
  input  logic [MAXP-1:0]  victim_used,
  output logic             good,
  output logic             poor
);

  always_comb begin
    good = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (nbr_valid[w] && nbr_tag[w] == req_tag) good = 1'b1;
  end

  always_comb begin
    int unsigned n, half;
    logic any_valid, first_unused, second_unused;
    n    = 1 << fsz;
    half = n >> 1;
    any_valid     = 1'b0;
    first_unused  = 1'b1;
    second_unused = 1'b1;
    for (int unsigned k = 0; k < MAXP; k++) begin
      if (k < n) begin
        if (victim_valid[k]) any_valid = 1'b1;
        if (victim_valid[k] && victim_used[k]) begin
          if (k < half) first_unused  = 1'b0;
          else          second_unused = 1'b0;
        end
      end
    end
    poor = (n > 1) && any_valid && (first_unused || second_unused);
  end

endmodule
