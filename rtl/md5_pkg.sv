// md5_pkg: constants and step functions of the MD5 compression function (RFC 1321),
// used by the MD5 processing elements. K[i] = floor(|sin(i+1)| * 2^32).
package md5_pkg;

  localparam logic [31:0] IV [4] = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476};

  localparam logic [31:0] K [64] = '{
    32'hd76aa478, 32'he8c7b756, 32'h242070db, 32'hc1bdceee,
    32'hf57c0faf, 32'h4787c62a, 32'ha8304613, 32'hfd469501,
    32'h698098d8, 32'h8b44f7af, 32'hffff5bb1, 32'h895cd7be,
    32'h6b901122, 32'hfd987193, 32'ha679438e, 32'h49b40821,
    32'hf61e2562, 32'hc040b340, 32'h265e5a51, 32'he9b6c7aa,
    32'hd62f105d, 32'h02441453, 32'hd8a1e681, 32'he7d3fbc8,
    32'h21e1cde6, 32'hc33707d6, 32'hf4d50d87, 32'h455a14ed,
    32'ha9e3e905, 32'hfcefa3f8, 32'h676f02d9, 32'h8d2a4c8a,
    32'hfffa3942, 32'h8771f681, 32'h6d9d6122, 32'hfde5380c,
    32'ha4beea44, 32'h4bdecfa9, 32'hf6bb4b60, 32'hbebfbc70,
    32'h289b7ec6, 32'heaa127fa, 32'hd4ef3085, 32'h04881d05,
    32'hd9d4d039, 32'he6db99e5, 32'h1fa27cf8, 32'hc4ac5665,
    32'hf4292244, 32'h432aff97, 32'hab9423a7, 32'hfc93a039,
    32'h655b59c3, 32'h8f0ccc92, 32'hffeff47d, 32'h85845dd1,
    32'h6fa87e4f, 32'hfe2ce6e0, 32'ha3014314, 32'h4e0811a1,
    32'hf7537e82, 32'hbd3af235, 32'h2ad7d2bb, 32'heb86d391
  };

  // Per-round rotation amounts, indexed [round][step mod 4].
  localparam logic [4:0] S [4][4] = '{
    '{5'd7, 5'd12, 5'd17, 5'd22},
    '{5'd5, 5'd9,  5'd14, 5'd20},
    '{5'd4, 5'd11, 5'd16, 5'd23},
    '{5'd6, 5'd10, 5'd15, 5'd21}
  };

  function automatic logic [31:0] rotl(input logic [31:0] x, input logic [4:0] n);
    return (x << n) | (x >> (6'd32 - {1'b0, n}));
  endfunction

  // Round function F, G, H or I.
  function automatic logic [31:0] f_round(input logic [1:0] r,
                                          input logic [31:0] b, c, d);
    case (r)
      2'd0:    return (b & c) | (~b & d);
      2'd1:    return (d & b) | (~d & c);
      2'd2:    return b ^ c ^ d;
      default: return c ^ (b | ~d);
    endcase
  endfunction

  // Index of the message word used at step j (0..15) of round r.
  function automatic logic [3:0] g_index(input logic [1:0] r, input logic [3:0] j);
    case (r)
      2'd0:    return j;
      2'd1:    return 4'(5 * j + 1);
      2'd2:    return 4'(3 * j + 5);
      default: return 4'(7 * j);
    endcase
  endfunction

endpackage
