// ccl_pkg: types and cycle-count formulas shared by the connected component
// labeling (CCL) linear array.
//
// The array labels an NxN multivalued image in four passes. Pass 1 and Pass 3
// are "merge" passes (a row is labeled and label equivalences are recorded);
// Pass 2 and Pass 4 are "relabel" passes (the row is rewritten through its
// equivalence table). Passes 1/2 form the forward stage (top to bottom),
// Passes 3/4 the backward stage (bottom to top).
//
// The stage and total cycle counts (N^2/2+3N-2 and N^2+6N-4) are the ones
// derived for this architecture; labels are y*N+x with x,y in 1..N, so a label
// needs label_bits(N) bits. The pe_events_t struct is this design's own
// observability port, one bit per mechanism, used by testbenches.
package ccl_pkg;

  typedef enum logic [1:0] {
    PASS1 = 2'd0,   // forward merge
    PASS2 = 2'd1,   // forward relabel
    PASS3 = 2'd2,   // backward merge
    PASS4 = 2'd3    // backward relabel
  } pass_e;

  // One-cycle event flags of a processing element.
  typedef struct packed {
    logic active;     // PE processed a pixel this cycle
    logic new_label;  // Pass 1 pixel with no same-valued neighbour got y*N+x
    logic merge;      // PE recorded an equivalence of two different labels
    logic received;   // PE added an equivalence received from the previous PE
    logic relabel;    // Pass 2/4 changed a stored label
    logic rsr_hit;    // a relabel shift register rewrote an in-flight label
  } pe_events_t;

  function automatic int label_bits(input int n);
    return $clog2(n * n + n + 1);
  endfunction

  function automatic int stage_cycles(input int n);
    return n * n / 2 + 3 * n - 2;
  endfunction

  function automatic int total_cycles(input int n);
    return n * n + 6 * n - 4;
  endfunction

endpackage
