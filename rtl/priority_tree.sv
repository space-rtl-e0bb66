// priority_tree: priority resolution over N request lines.
//
// Built as a two-level high-radix tree. The first level splits the inputs
// into groups of RADIX and, inside each group, forms the OR of all earlier
// requests. The second level does the same over the group ORs. `prior[i]`
// is then 1 when any input below i requests, or when `prq` says that a
// preceding chip requests; `first` is the one-hot lowest request that has no
// earlier request anywhere; `any` (the chip's REQ) is the OR of all inputs.
// A cascade of chips uses `any` and `prq` as a leaf of an external tree of
// the same kind. Purely combinational. The two-level structure and the radix
// are this design's choices; the text asks only for a high-radix tree.
module priority_tree #(
  parameter int unsigned N     = 148,
  parameter int unsigned RADIX = 12
) (
  input  logic         prq,      // a preceding chip has a request
  input  logic [N-1:0] req,
  output logic [N-1:0] first,
  output logic [N-1:0] prior,
  output logic         any
);
  localparam int unsigned G = (N + RADIX - 1) / RADIX;

  logic [G-1:0] grp_any;     // OR of the requests of each group
  logic [G-1:0] grp_before;  // OR of all earlier groups (and prq)
  logic [N-1:0] in_grp;      // OR of earlier requests in the same group

  always_comb begin
    for (int g = 0; g < G; g++) begin
      logic acc;
      acc = 1'b0;
      for (int k = 0; k < RADIX; k++) begin
        int unsigned i;
        i = g * RADIX + k;
        if (i < N) begin
          in_grp[i] = acc;
          acc       = acc | req[i];
        end
      end
      grp_any[g] = acc;
    end
  end

  always_comb begin
    logic acc;
    acc = prq;
    for (int g = 0; g < G; g++) begin
      grp_before[g] = acc;
      acc           = acc | grp_any[g];
    end
    any = |grp_any;
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      prior[i] = grp_before[i / RADIX] | in_grp[i];
      first[i]  = req[i] & ~prior[i];
    end
  end
endmodule
