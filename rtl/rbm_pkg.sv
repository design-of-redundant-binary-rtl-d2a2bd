// rbm_pkg: types and sizing helpers shared by the redundant-binary (RB)
// multiplier blocks.
//
// An N-bit multiplier (N a power of two, N >= 8) uses N/2 radix-4 Booth
// groups. Pairs of adjacent Booth rows form N/4 RB partial-product rows; the
// reduction tree then needs ceil(log2(N/4)) RB accumulation stages. RB
// numbers are carried as two plain bit vectors, a "plus" and a "minus"
// vector, whose value is plus - minus (digit encoding (1,0)=+1, (0,1)=-1,
// (0,0)=(1,1)=0).
// Row and stage counts follow the method; the type layout is this design's.
package rbm_pkg;

  // Control word of one radix-4 Booth group (encoder output, decoder input).
  //   one    : select +-A
  //   two    : select +-2A
  //   neg    : invert the selected multiple (one's complement); the missing
  //            +1 is the row's correction bit
  //   force1 : drive every decoder output to 1 (used only by the modified
  //            encoder of the last positive Booth row, digit pattern 111)
  typedef struct packed {
    logic force1;
    logic neg;
    logic two;
    logic one;
  } mbe_code_t;

  // Number of RB partial-product rows for an N-bit multiplier.
  function automatic int rbpp_rows(input int n);
    return n / 4;
  endfunction

  // Number of RB accumulation stages needed to reduce `rows` RB rows to one.
  function automatic int accum_stages(input int rows);
    return (rows <= 1) ? 0 : $clog2(rows);
  endfunction

  // Lowest bit position at which RB row r (0-based) can hold a non-zero bit.
  // Row 0 starts at bit 0; row r >= 1 also carries the error-correcting word
  // of row r-1, which starts at bit 4(r-1).
  function automatic int row_lsb(input int r);
    return (r == 0) ? 0 : 4 * r - 4;
  endfunction

endpackage
