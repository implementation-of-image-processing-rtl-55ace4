// median_ref_pkg: reference models for the median filter testbenches,
// written directly from the definition (sort and take the middle value),
// independent of the compare network in the design.
package median_ref_pkg;

  typedef logic [7:0] byte_t;

  // median of nine values by full insertion sort
  function automatic byte_t med9(input byte_t v[9]);
    byte_t s[9];
    byte_t t;
    s = v;
    for (int i = 1; i < 9; i++) begin
      t = s[i];
      for (int j = i; j > 0; j--) begin
        if (s[j-1] > t) begin
          s[j] = s[j-1];
          s[j-1] = t;
        end
      end
    end
    return s[4];
  endfunction

  // median of three sets of three
  function automatic byte_t med_sets(input byte_t a[3], input byte_t b[3], input byte_t c[3]);
    byte_t v[9];
    for (int i = 0; i < 3; i++) begin
      v[i] = a[i]; v[3+i] = b[i]; v[6+i] = c[i];
    end
    return med9(v);
  endfunction

endpackage
