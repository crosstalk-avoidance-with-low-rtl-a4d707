// bem_pkg: constants and types shared by the bus encoder and bus decoder.
//
// The bus-encoding scheme carries a 7-bit word over 4 wires. If the word has
// four or more 1s it is inverted (the ED line says so), which leaves at most
// three 1s. The positions of those 1s are sent as three 3-bit codes, one per
// clock cycle. A code k in 1..7 names line k (bit k-1 of the word); code 0 is
// the null value meaning "no line". The 7-bit width, the threshold of four,
// the three registers and the eight 3-bit codes follow the published scheme;
// using code 0 as the null value is this design's reading of its code table.
package bem_pkg;

  localparam int unsigned DATA_W = 7;   // bus word width
  localparam int unsigned POS_W  = 3;   // width of one position code
  localparam int unsigned SLOTS  = 3;   // position registers per word
  localparam int unsigned THRESH = 4;   // invert when the 1-count reaches this

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [POS_W-1:0]  pos_t;
  typedef pos_t [SLOTS-1:0]  pos_vec_t;   // slot 0 in the low bits

  localparam pos_t POS_NULL = '0;

  // One-hot line mask named by a position code; the null code gives no line.
  function automatic word_t pos_to_mask(pos_t p);
    word_t m;
    m = '0;
    if (p != POS_NULL) m[p - 1'b1] = 1'b1;   // codes 1..7 name bits 0..6
    return m;
  endfunction

endpackage
