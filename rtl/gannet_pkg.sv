// gannet_pkg: word, packet and symbol formats shared by the Gannet Service
// Manager blocks.
//
// The design is built on 32-bit words (the LocalLink data path and the data
// memory are 32 bits wide). Every packet starts with three header words:
//   H0 = {type[2:0], 5'b0, dest[7:0], src[7:0], length[7:0]}
//   H1 = return-to service id in bits [7:0] (where a result must be sent)
//   H2 = return-as symbol (for a code packet: the reference symbol that
//        names the code chunk; for a data packet: the symbol whose chunk
//        receives the payload)
// followed by `length` payload words. Code and reference packets, data
// packets and three header words are the document's; the bit layout of
// the header words is this design's own.
//
// A symbol is one 32-bit word:
//   [31:29] kind  (K_S service, K_R reference, K_B built-in constant)
//   [27]    ext   (an extended constant: [7:0] gives the number of extension
//                  words that follow the symbol)
//   [23:16] service id (for K_R: the service that holds the referenced code)
//   [6:0]   address (for K_R: code chunk / symbol-table slot)
// The kind values 0, 4 and 6 and the "name field = number of extension
// words" rule are taken from symbol words printed in the simulation traces;
// the remaining field positions are this design's choice.
package gannet_pkg;

  localparam int unsigned WORD_W = 32;
  typedef logic [WORD_W-1:0] word_t;

  // Chunk geometry: 128 chunks of 8 words give the 1024-word memories.
  localparam int unsigned ADDR_W      = 7;   // chunk / symbol address width
  localparam int unsigned CHUNK_W     = 3;   // log2 words per chunk
  localparam int unsigned CHUNK_WORDS = 1 << CHUNK_W;
  typedef logic [ADDR_W-1:0] chunk_addr_t;

  typedef enum logic [2:0] {
    P_ERROR = 3'd0,
    P_CODE  = 3'd1,
    P_REF   = 3'd3,
    P_DATA  = 3'd4
  } pkt_type_e;

  typedef enum logic [2:0] {
    K_S = 3'd0,   // service (opcode)
    K_R = 3'd4,   // reference to a subtask
    K_B = 3'd6    // built-in / extended constant
  } sym_kind_e;

  typedef struct packed {
    pkt_type_e  ptype;
    logic [4:0] rsvd;
    logic [7:0] dest;
    logic [7:0] src;
    logic [7:0] length;
  } hdr0_t;

  function automatic pkt_type_e pkt_type(word_t w);
    return pkt_type_e'(w[31:29]);
  endfunction

  function automatic sym_kind_e sym_kind(word_t w);
    return sym_kind_e'(w[31:29]);
  endfunction

  function automatic logic sym_ext(word_t w);
    return w[27];
  endfunction

  function automatic logic [7:0] sym_service(word_t w);
    return w[23:16];
  endfunction

  function automatic chunk_addr_t sym_addr(word_t w);
    return w[ADDR_W-1:0];
  endfunction

  function automatic word_t make_hdr0(pkt_type_e t, logic [7:0] dest,
                                      logic [7:0] src, logic [7:0] len);
    hdr0_t h;
    h.ptype  = t;
    h.rsvd   = '0;
    h.dest   = dest;
    h.src    = src;
    h.length = len;
    return word_t'(h);
  endfunction

  // Word handed to the service core for each argument of a subtask:
  // the symbol kind and the data-memory word address of the argument.
  function automatic word_t make_arg(sym_kind_e k, logic [ADDR_W+CHUNK_W-1:0] a);
    return {k, {(WORD_W-3-ADDR_W-CHUNK_W){1'b0}}, a};
  endfunction

endpackage
