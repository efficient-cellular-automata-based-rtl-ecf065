// pca_pkg: constants and helpers shared by the cellular-automaton GF(2^m)
// multiplier. The step count of a multiplier with K cascaded levels of cells
// is ceil(M/K) clock cycles, as published; the two-state controller encoding
// is this design's own.
package pca_pkg;

  // Number of clock cycles the PCA runs for one multiplication when K
  // levels of cells are cascaded between the state flip-flops: ceil(M/K).
  function automatic int unsigned pca_steps(input int unsigned m, input int unsigned k);
    return (m + k - 1) / k;
  endfunction

  // Controller state: idle (result held) or running the PCA.
  typedef enum logic {
    PCA_IDLE = 1'b0,
    PCA_RUN  = 1'b1
  } pca_state_e;

endpackage
