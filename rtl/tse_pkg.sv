// tse_pkg: constants shared by the twin-symbol-encoding (TSE) test data decompressor.
//
// MAX_BLOCK_LEN is m, the longest run of equal bits that one symbol may stand for. The
// symbol alphabet has m+1 members: runs of 1..m bits followed by a toggle of the data value,
// and the twin symbol m' (m bits, data value held). m = 16 is one of the three limits (8, 16,
// 32) the method is evaluated with; the decoder modules take it as a parameter.
// SCAN_LEN, the length of the scan chain fed by the decoder, belongs to the circuit under
// test rather than to the method; 64 is this design's choice.
//
// Code-table entries: each internal node of the Huffman tree has two children (bit 0 and
// bit 1). A child is either another internal node or a leaf that names a symbol. Symbol
// index k in 0..m-1 means "run of k+1 bits, then toggle"; index m means the twin m'.
package tse_pkg;
  localparam int unsigned MAX_BLOCK_LEN = 16;
  localparam int unsigned SCAN_LEN      = 64;

  // Width of a node or symbol index for a given m (nodes 0..m-1, symbols 0..m).
  function automatic int unsigned idx_width(input int unsigned m);
    return $clog2(m + 1);
  endfunction
endpackage
