// pfecc_pkg: constants and constant functions shared by the ECC-protected
// parallel filter bank.
//
// The bank protects K identical filters that process K different inputs by
// treating each filter as one data "bit" of a single-error-correcting Hamming
// code. R = n - k extra "check" filters filter sums of the inputs; comparing
// their outputs with the same sums of the data outputs gives a syndrome that
// locates a faulty filter.
//
// Check matrix construction. Column i of the data part of H (i = 0..K-1,
// data filter d(i+1)) is taken from the list of all R-bit vectors with at
// least two ones, ordered by decreasing weight and, within one weight, by
// decreasing value with row s1 read as the most significant bit. For R = 3
// this gives d1 = 111, d2 = 110, d3 = 101, d4 = 011, which is the (7,4)
// Hamming code of the case study (p1 = d1^d2^d3, p2 = d1^d2^d4,
// p3 = d1^d3^d4). The parity part of H is the identity, so a syndrome with a
// single one points at a check filter. For K = 11 the same rule yields a
// (15,11) Hamming code; that column order is this design's own choice.
//
// In the vectors returned here, bit j stands for row j (syndrome bit s(j+1)).
package pfecc_pkg;

  // Largest number of check filters supported by the column vectors below.
  localparam int unsigned MAX_R = 8;

  typedef logic [MAX_R-1:0] col_t;

  // Number of check filters R: the smallest r with 2^r - r - 1 >= k.
  function automatic int unsigned check_count(input int unsigned k);
    int unsigned r;
    r = 2;
    while (((1 << r) - r - 1) < k) r++;
    return r;
  endfunction

  // Column of H for data filter i (0-based) in a code with r check rows.
  function automatic col_t data_column(input int unsigned r, input int unsigned i);
    int unsigned found;
    col_t col;
    found = 0;
    col   = '0;
    for (int w = int'(r); w >= 2; w--) begin
      for (int v = (1 << r) - 1; v >= 0; v--) begin
        if ($countones(v) == w) begin
          if (found == i) begin
            // v has s1 as its MSB; turn it into the row-indexed vector.
            for (int j = 0; j < int'(r); j++) col[j] = v[int'(r) - 1 - j];
            return col;
          end
          found++;
        end
      end
    end
    return col;
  endfunction

  // H[row][i] for data filter i.
  function automatic logic h_bit(input int unsigned r, input int unsigned row,
                                 input int unsigned i);
    return 1'(data_column(r, i) >> row);
  endfunction

  // Number of data filters summed by check row `row`.
  function automatic int unsigned row_weight(input int unsigned k, input int unsigned r,
                                             input int unsigned row);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < k; i++) if (h_bit(r, row, i)) n++;
    return n;
  endfunction

  // Largest row weight over all check rows.
  function automatic int unsigned max_row_weight(input int unsigned k);
    int unsigned r, m;
    r = check_count(k);
    m = 1;
    for (int unsigned j = 0; j < r; j++) if (row_weight(k, r, j) > m) m = row_weight(k, r, j);
    return m;
  endfunction

  // First check row that contains data filter i; its check filter is used to
  // rebuild that filter's output after an error.
  function automatic int unsigned repair_row(input int unsigned r, input int unsigned i);
    for (int unsigned j = 0; j < r; j++) if (h_bit(r, j, i)) return j;
    return 0;
  endfunction

  // Width of a check filter input: the data input width grown so that the sum
  // of max_row_weight(k) inputs cannot overflow (10 bits for 8-bit inputs and
  // k = 4).
  function automatic int unsigned check_in_width(input int unsigned k, input int unsigned in_w);
    return in_w + $clog2(max_row_weight(k));
  endfunction

endpackage
