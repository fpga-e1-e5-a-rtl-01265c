// e5_ref_pkg: reference models used by the testbenches.
//
// e5_code() builds the 10230-chip E5 primary code from two 14-stage shift
// registers given as stage arrays (stage 1 receives the feedback, stage 14
// is the output); taps lists the stages in the feedback XOR. It is written
// independently of the RTL generator and is used to check it and to
// synthesise received signals.
package e5_ref_pkg;
  typedef bit code_t [10230];

  function automatic code_t e5_code(input bit sel_b, input bit [13:0] init2);
    code_t c;
    bit s1 [1:14];
    bit s2 [1:14];
    int t1 [$], t2 [$];
    if (!sel_b) begin t1 = '{1, 6, 8, 14}; t2 = '{4, 5, 7, 8, 12, 14}; end
    else        begin t1 = '{4, 11, 13, 14}; t2 = '{2, 5, 8, 9, 12, 14}; end
    for (int k = 1; k <= 14; k++) begin s1[k] = 1'b1; s2[k] = init2[k-1]; end
    for (int n = 0; n < 10230; n++) begin
      bit f1, f2;
      c[n] = s1[14] ^ s2[14];
      f1 = 0; f2 = 0;
      foreach (t1[j]) f1 ^= s1[t1[j]];
      foreach (t2[j]) f2 ^= s2[t2[j]];
      for (int k = 14; k > 1; k--) begin s1[k] = s1[k-1]; s2[k] = s2[k-1]; end
      s1[1] = f1; s2[1] = f2;
    end
    return c;
  endfunction
endpackage
