// mspcca_pkg: types, sizes and functions shared by the blocks of the
// multi-subset prefix-coloring packet classifier.
//
// The classifier looks at five header fields (dimensions), in this order:
// source IP, destination IP, protocol, source port, destination port.
// Every field is handed to the longest-prefix-match stage left-aligned in a
// 32-bit word, so one prefix-matching engine serves all five dimensions.
//
// Numbers taken from the design description: 5 dimensions, 8 colors,
// 3 subsets, 8 spoiler rules, 16-bit vertex-table words. All other sizes
// (prefix ids, rule numbers, table depths, hash widths) are this design's
// own choices and are marked as such below.
package mspcca_pkg;

  // ---- sizes given by the design description ----------------------------
  localparam int unsigned N_DIMS      = 5;   // 5-tuple
  localparam int unsigned N_COLORS    = 8;   // colors per dimension
  localparam int unsigned N_SUBSETS   = 3;   // rule-set subsets
  localparam int unsigned N_SPOILERS  = 8;   // spoiler rules (TCAM branch)
  localparam int unsigned VT_DATA_W   = 16;  // vertex-table integer width

  // ---- sizes chosen here -------------------------------------------------
  localparam int unsigned COLOR_W     = $clog2(N_COLORS);
  localparam int unsigned SUBSET_W    = 2;   // enough for N_SUBSETS = 3
  localparam int unsigned N_PREFIX    = 256; // prefix entries per dimension
  localparam int unsigned ID_W        = $clog2(N_PREFIX); // prefix id width
  localparam int unsigned LEN_W       = 6;   // prefix length 0..32
  localparam int unsigned KEY_W       = N_DIMS * ID_W; // LPM vector width
  localparam int unsigned RULE_NO_W   = 16;  // rule number (= priority)
  localparam int unsigned RT_DEPTH    = 2048;// rule table entries
  localparam int unsigned RT_AW       = $clog2(RT_DEPTH);
  localparam int unsigned VT_AW       = 12;  // vertex-table half address
  // external address = {subset, half, index}
  localparam int unsigned VT_ADDR_W   = SUBSET_W + 1 + VT_AW;
  localparam int unsigned BF_K        = 8;   // Bloom hash functions
  localparam int unsigned BF_PART_AW  = 11;  // 2048 bits per partition

  // Default (universal) rule: returned when nothing else matches.
  localparam logic [RULE_NO_W-1:0] DEFAULT_RULE = '1;

  // ---- packet header -----------------------------------------------------
  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [7:0]  proto;
    logic [15:0] src_port;
    logic [15:0] dst_port;
  } header_t;

  // ---- LPM stage ---------------------------------------------------------
  // One stored prefix of one dimension. bitmap[d][c] is set when this prefix
  // appears in a rule together with a prefix of color c in dimension d.
  typedef logic [N_DIMS-1:0][N_COLORS-1:0] bitmap_t;

  typedef struct packed {
    logic                valid;
    logic [31:0]         value;   // left-aligned prefix bits
    logic [LEN_W-1:0]    len;     // number of significant bits
    logic [SUBSET_W-1:0] subset;
    logic [COLOR_W-1:0]  color;
    bitmap_t             bitmap;
  } lpm_entry_t;

  // What the LPM returns for one (subset, color) pair.
  typedef struct packed {
    logic             valid;
    logic [ID_W-1:0]  id;
    logic [LEN_W-1:0] len;
    bitmap_t          bitmap;
  } lpm_hit_t;

  typedef lpm_hit_t [N_COLORS-1:0]                hit_colors_t;   // one dim
  typedef hit_colors_t [N_DIMS-1:0]               hit_dims_t;     // one subset

  // LPM vector: one prefix id per dimension, used as hash key.
  typedef logic [N_DIMS-1:0][ID_W-1:0] key_t;

  // ---- rules -------------------------------------------------------------
  // A rule as stored in the rule table and in the spoiler matcher.
  typedef struct packed {
    logic                 valid;
    logic [31:0]          src_ip;
    logic [LEN_W-1:0]     src_len;
    logic [31:0]          dst_ip;
    logic [LEN_W-1:0]     dst_len;
    logic [7:0]           proto;
    logic                 proto_any;
    logic [15:0]          sport_lo;
    logic [15:0]          sport_hi;
    logic [15:0]          dport_lo;
    logic [15:0]          dport_hi;
    logic [RULE_NO_W-1:0] rule_no;
  } rule_t;

  // ---- configuration write ports ----------------------------------------
  typedef struct packed {
    logic                           we;
    logic [$clog2(N_DIMS)-1:0]      dim;
    logic [ID_W-1:0]                idx;
    lpm_entry_t                     entry;
  } lpm_wr_t;

  typedef struct packed {
    logic                           we;
    logic [SUBSET_W-1:0]            subset;
    logic [$clog2(BF_K)-1:0]        part;
    logic [BF_PART_AW-1:0]          addr;
    logic                           bit_val;
  } bf_wr_t;

  typedef struct packed {
    logic                           we;
    logic [RT_AW-1:0]               addr;
    rule_t                          rule;
  } rt_wr_t;

  typedef struct packed {
    logic                           we;
    logic [$clog2(N_SPOILERS)-1:0]  idx;
    rule_t                          rule;
  } sp_wr_t;

  // ---- functions ---------------------------------------------------------

  // Mask with the top `len` bits of a 32-bit word set.
  function automatic logic [31:0] prefix_mask(input logic [LEN_W-1:0] len);
    return (len == '0) ? 32'h0 : ~(32'hFFFF_FFFF >> len);
  endfunction

  function automatic logic prefix_match(input logic [31:0] value,
                                        input logic [31:0] prefix,
                                        input logic [LEN_W-1:0] len);
    logic [31:0] m;
    m = prefix_mask(len);
    return ((value ^ prefix) & m) == '0;
  endfunction

  // Full check of a packet header against one rule.
  function automatic logic rule_match(input rule_t r, input header_t h);
    return r.valid
        && prefix_match(h.src_ip, r.src_ip, r.src_len)
        && prefix_match(h.dst_ip, r.dst_ip, r.dst_len)
        && (r.proto_any || (h.proto == r.proto))
        && (h.src_port >= r.sport_lo) && (h.src_port <= r.sport_hi)
        && (h.dst_port >= r.dport_lo) && (h.dst_port <= r.dport_hi);
  endfunction

  // H3 hash: output bit j is the parity of the key bits selected by row j
  // of a fixed pseudo-random matrix. The matrix is produced by a 32-bit
  // xorshift generator started from `seed`, so every seed gives a different
  // member of the H3 family. With a constant seed this is an XOR tree.
  function automatic logic [15:0] h3_hash(input key_t key, input logic [31:0] seed);
    logic [31:0] s;
    logic [15:0] h;
    s = seed | 32'h1;
    h = '0;
    for (int i = 0; i < KEY_W; i++) begin
      s = s ^ (s << 13);
      s = s ^ (s >> 17);
      s = s ^ (s << 5);
      if (key[i / ID_W][i % ID_W]) h = h ^ s[15:0];
    end
    return h;
  endfunction

  // Seeds of the hash functions (arbitrary constants).
  function automatic logic [31:0] bf_seed(input int unsigned part);
    return 32'h9E37_79B9 + 32'h0101_2345 * part;
  endfunction
  localparam logic [31:0] PHF_SEED_A = 32'h2545_F491;
  localparam logic [31:0] PHF_SEED_B = 32'h6C07_8965;

endpackage
