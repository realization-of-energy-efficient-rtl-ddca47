// Shared types of the carry skip adders: a stage-size list. Stage k of an
// adder (k = 0 is stage 1, the least significant) is STAGE_SIZE[k] bits wide;
// the list ends at the first zero entry, so any number of stages up to
// MAX_STAGES can be described with one fixed-size parameter type.
package cska_pkg;
  localparam int unsigned MAX_STAGES = 16;

  typedef int unsigned stage_sizes_t [MAX_STAGES];

  // number of stages: entries before the first zero
  function automatic int unsigned num_stages(stage_sizes_t sizes);
    int unsigned n = 0;
    for (int unsigned i = 0; i < MAX_STAGES; i++) begin
      if (sizes[i] == 0) break;
      n++;
    end
    return n;
  endfunction

  // bit position of the least significant bit of stage k
  function automatic int unsigned stage_lsb(stage_sizes_t sizes, int unsigned k);
    int unsigned acc = 0;
    for (int unsigned i = 0; i < k; i++) acc += sizes[i];
    return acc;
  endfunction
endpackage
