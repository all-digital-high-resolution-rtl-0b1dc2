// ddpm_ref_pkg: reference model of the DDPM slot pattern for the testbenches.
//
// Builds a frame directly from the definition of the dyadic sequences: bit i
// of an N-bit code puts a pulse in the slots 2^(N-i)*h + 2^(N-i-1) for
// h = 0 .. 2^i - 1. Every other slot stays 0. The builder also reports
// whether two sequences ever claimed the same slot (they must not).
package ddpm_ref_pkg;

  function automatic void build_frame(input int unsigned code, input int unsigned n,
                                      output bit frame[], output bit overlap);
    int unsigned slot;
    bit claimed[];
    frame   = new[2 ** n];
    claimed = new[2 ** n];
    overlap = 0;
    for (int unsigned i = 0; i < n; i++) begin
      for (int unsigned h = 0; h < (2 ** i); h++) begin
        slot = (2 ** (n - i)) * h + (2 ** (n - i - 1));
        if (claimed[slot]) overlap = 1;
        claimed[slot] = 1;
        frame[slot]   = code[i];
      end
    end
  endfunction

endpackage
