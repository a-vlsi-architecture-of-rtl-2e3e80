// Binary lookahead carry (BLC) adder: sum = a + b + cin.
//
// A parallel-prefix adder of the Brent-Kung kind. Each bit's generate/propagate
// pair is formed first (the carry-in folded into bit 0), then an up-sweep tree
// combines pairs over spans 2, 4, 8, ... and a down-sweep fills in the carries
// of the remaining bit positions, so every carry is ready after about 2*log2(W)
// combine levels with only about 2W combine cells, in a regular layout. The
// half butterfly unit uses two of these, one for the real and one for the
// imaginary part. The document names the BLC adder and its regular layout; the
// prefix structure written here is the standard one for that name.
// Purely combinational; W is any width of at least 2.
module blc_adder #(
  parameter int unsigned W = 19
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum
);

  localparam int unsigned LW = $clog2(W);
  localparam int unsigned PW = 1 << LW;   // width padded to a power of two

  logic [PW-1:0] g, p, pp;

  always_comb begin
    g  = '0;
    p  = '0;
    pp = '0;
    for (int i = 0; i < W; i++) begin
      g[i]  = a[i] & b[i];
      p[i]  = a[i] ^ b[i];
      pp[i] = a[i] ^ b[i];
    end
    g[0] = g[0] | (p[0] & cin);
    // Up-sweep: position i collects the span ending at i of length 2^(l+1).
    for (int l = 0; l < LW; l++) begin
      for (int i = 0; i < PW; i++) begin
        if ((i + 1) % (2 << l) == 0) begin
          g[i] = g[i] | (p[i] & g[i - (1 << l)]);
          p[i] = p[i] & p[i - (1 << l)];
        end
      end
    end
    // Down-sweep: the remaining positions take the prefix ending just below them.
    for (int l = LW - 2; l >= 0; l--) begin
      for (int i = 0; i < PW; i++) begin
        if (i >= (2 << l) && (i + 1) % (2 << l) == (1 << l)) begin
          g[i] = g[i] | (p[i] & g[i - (1 << l)]);
          p[i] = p[i] & p[i - (1 << l)];
        end
      end
    end
    // g[i] is now the carry out of bits i..0.
    sum[0] = pp[0] ^ cin;
    for (int i = 1; i < W; i++) sum[i] = pp[i] ^ g[i - 1];
  end

endmodule
