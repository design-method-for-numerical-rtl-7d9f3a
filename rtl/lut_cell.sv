// lut_cell: one LUT of the LUT cascade that realises the segment index
// function (x -> index i of the segment holding x).
//
// The cascade reads the offset-binary input MSB first. After P bits have been
// consumed, the remaining function of the unread bits is one of at most 2T
// sub-functions, because the index function is a monotone step function: a
// block of inputs either lies inside one segment (constant b) or is the one
// block whose first segment is b and which contains the end e_b of that
// segment. The rails therefore carry {h, b}: b = index of the segment at the
// start of the current block, h = 1 when the block contains a segment end.
// This cell consumes W more bits and produces the rails for the smaller block.
// The first cell has no rail inputs; in the last cell b is the index itself.
//
// The table contents are computed when the ROM is initialised, from the list
// of segment ends E_0 < E_1 < ... < E_{T-2} (offset-binary codes, one per
// line of BND_FILE; line T-1 is unused). The output is registered: one cycle
// from (rails_in, xbits) to rails_out.
//
// The cascade structure (cells with input bits and rails) follows the design
// method; the rail encoding above is this implementation's own construction,
// a valid functional decomposition that needs U+1 rails.
module lut_cell #(
  parameter int unsigned N        = 24,  // input width
  parameter int unsigned U        = 7,   // index width, T = 2^U segments
  parameter int unsigned P        = 0,   // input bits consumed before this cell
  parameter int unsigned W        = 10,  // input bits consumed by this cell
  parameter bit          FIRST    = 1'b1,
  parameter string       BND_FILE = "rtl/nfg_cos_k2_n24_bnd.hex"
) (
  input  logic         clk,
  input  logic [U:0]   rails_in,   // {h, b}; ignored in the first cell
  input  logic [W-1:0] xbits,      // next W input bits, MSB first
  output logic [U:0]   rails_out   // {h', b'}
);
  localparam int unsigned AWID  = FIRST ? W : (U + 1 + W);
  localparam int unsigned DEPTH = 1 << AWID;
  localparam int unsigned T     = 1 << U;
  localparam int unsigned REST  = N - P - W;   // bits left after this cell

  logic [N-1:0] bnd [T];
  logic [U:0]   rom [DEPTH];
  logic [AWID-1:0] addr;

  typedef logic [N-1:0] bnd_t [T];

  // Index of the segment holding code s (binary search over the sorted
  // segment ends), and whether [s, s+size-1] holds a segment end strictly
  // before its last code.
  function automatic logic [U:0] next_rails(bnd_t e, longint s, longint size);
    int unsigned lo = 0, hi = T - 1, mid;
    logic h;
    while (lo < hi) begin
      mid = (lo + hi) / 2;
      if (longint'(e[mid]) < s) lo = mid + 1;
      else                      hi = mid;
    end
    h = (lo < T - 1) && (longint'(e[lo]) < s + size - 1);
    return {h, U'(lo)};
  endfunction

  initial begin
    $readmemh(BND_FILE, bnd);
    for (int unsigned a = 0; a < DEPTH; a++) begin
      longint c;
      longint prefix;
      logic   h_in;
      int unsigned b_in;
      c = longint'(a) % (longint'(1) << W);
      if (FIRST) begin
        prefix = 0;
        h_in   = 1'b1;
        b_in   = 0;
      end else begin
        h_in   = 1'((a >> (U + W)) & 1);
        b_in   = (a >> W) % T;
        prefix = (b_in < T - 1) ? (longint'(bnd[b_in]) >> (N - P)) : 0;
      end
      if (!h_in)
        rom[a] = {1'b0, U'(b_in)};
      else if (!FIRST && b_in >= T - 1)
        rom[a] = '0;
      else
        rom[a] = next_rails(bnd, ((prefix << W) | c) << REST, longint'(1) << REST);
    end
  end

  assign addr = FIRST ? AWID'(xbits) : AWID'({rails_in, xbits});

  always_ff @(posedge clk)
    rails_out <= rom[addr];
endmodule
