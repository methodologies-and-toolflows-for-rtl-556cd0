// ft_pkg: shared types, constants and functions of the fault-tolerant mesh NoC.
//
// The data NoC carries 32-bit payload flits with a head and a tail marker.
// Every flit travels and is stored in a coded form: an extended Hamming code
// (SEC-DED) over the 34 information bits, 41 bits in all. The code lets a
// receiver detect a corrupted flit (and ask for it again with NACK/GO) and
// lets a buffer repair a single-bit upset in a stored flit on demand.
// The code itself is this design's choice; the thesis only asks for error
// detectors and on-demand correctors around the buffers.
//
// Also here: port numbering of the 5x5 switch, the 26 LBDR configuration bits
// and the dual-network (configuration ring) flit format.
package ft_pkg;

  // ---------------------------------------------------------------- flits
  localparam int unsigned DATA_W = 32;
  localparam int unsigned INFO_W = DATA_W + 2;     // head, tail, data
  localparam int unsigned HAM_R  = 6;              // 2^6 >= 34 + 6 + 1
  localparam int unsigned HAM_N  = INFO_W + HAM_R; // positions 1..40
  localparam int unsigned CODE_W = HAM_N + 1;      // plus overall parity at bit 0

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [DATA_W-1:0] data;
  } flit_t;

  typedef logic [CODE_W-1:0] code_t;

  // Header payload: destination coordinates in the low byte.
  localparam int unsigned COORD_W = 4;

  function automatic logic is_pow2(input int unsigned p);
    return (p & (p - 1)) == 0;
  endfunction

  // Code word layout, computed once at elaboration: information bit k sits at
  // the k-th position in 1..HAM_N that is not a power of two (3,5,6,7,9,...);
  // check bit i sits at position 2^i and covers every position whose index
  // has bit i set; bit 0 of the word is overall (even) parity.
  typedef logic [INFO_W-1:0][5:0]        pos_tab_t;
  typedef logic [HAM_R-1:0][CODE_W-1:0]  mask_tab_t;

  function automatic pos_tab_t info_positions();
    pos_tab_t t;
    int unsigned k;
    t = '0;
    k = 0;
    for (int unsigned p = 1; p <= HAM_N; p++)
      if (!is_pow2(p)) begin
        t[k] = 6'(p);
        k++;
      end
    return t;
  endfunction

  function automatic mask_tab_t check_masks();
    mask_tab_t m;
    m = '0;
    for (int unsigned i = 0; i < HAM_R; i++)
      for (int unsigned p = 1; p <= HAM_N; p++)
        if (((p >> i) & 1) != 0) m[i][p] = 1'b1;
    return m;
  endfunction

  localparam pos_tab_t  INFO_POS = info_positions();
  localparam mask_tab_t CHK_MASK = check_masks();

  // Encode: place the information bits, then set each check bit so that its
  // group has even parity, then the overall parity bit.
  function automatic code_t ecc_encode(input flit_t f);
    logic [INFO_W-1:0] info;
    code_t c;
    info = f;
    c = '0;
    for (int unsigned k = 0; k < INFO_W; k++) c[INFO_POS[k]] = info[k];
    for (int unsigned i = 0; i < HAM_R; i++) c[1 << i] = ^(c & CHK_MASK[i]);
    c[0] = ^c[HAM_N:1];
    return c;
  endfunction

  function automatic flit_t ecc_extract(input code_t c);
    logic [INFO_W-1:0] info;
    for (int unsigned k = 0; k < INFO_W; k++) info[k] = c[INFO_POS[k]];
    return flit_t'(info);
  endfunction

  // Syndrome: index of the flipped position for a single error, 0 if clean.
  function automatic logic [HAM_R-1:0] ecc_syndrome(input code_t c);
    logic [HAM_R-1:0] s;
    for (int unsigned i = 0; i < HAM_R; i++) s[i] = ^(c & CHK_MASK[i]);
    return s;
  endfunction

  // ------------------------------------------------------------- switch
  localparam int unsigned PORTS = 5;
  typedef enum logic [2:0] {P_LOCAL = 3'd0, P_NORTH = 3'd1, P_EAST = 3'd2,
                            P_SOUTH = 3'd3, P_WEST = 3'd4} port_e;

  // 26 LBDR configuration bits.
  localparam int unsigned CFG_W = 26;
  typedef struct packed {
    logic [COORD_W-1:0] my_x;   // switch coordinates
    logic [COORD_W-1:0] my_y;
    logic [1:0] dr;             // deroute port: 0 N, 1 E, 2 W, 3 S
    logic cn, ce, cw, cs;       // connectivity bits
    logic rnn, rne, rnw;        // routing bits, first letter = first hop
    logic ree, ren, res;
    logic rww, rwn, rws;
    logic rss, rse, rsw;
  } lbdr_cfg_t;

  // Diagnosis word: [4:0] channel-test fault per input port,
  //                 [9:5] routing-logic-test fault per input port.
  localparam int unsigned DIAG_W = 10;

  // -------------------------------------------------------- dual network
  localparam int unsigned DN_FLIT_W = 15;
  localparam int unsigned DN_ID_W   = 4;
  typedef enum logic [1:0] {DN_DIAG = 2'd0, DN_ECHO = 2'd1,
                            DN_CFG  = 2'd2, DN_NONE = 2'd3} dn_type_e;
  // head flit: [14:13] type, [12:9] switch ID, [8:0] zero
  function automatic logic [DN_FLIT_W-1:0] dn_head(input dn_type_e t,
                                                   input logic [DN_ID_W-1:0] id);
    return {t, id, 9'd0};
  endfunction

endpackage
