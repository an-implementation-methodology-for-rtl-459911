// Reference conversions of a signed integer score to a 16-bit word, included
// by testbenches. Works on the value's magnitude with integer arithmetic:
// exponent e = floor(log2 |v|), 11-bit significand |v| / 2^(e-10) rounded to
// nearest with ties to even, infinity from 2^16 up. The integer form saturates
// to the 16-bit signed range.
function automatic logic [15:0] ref_fp16(longint v);
  longint a, q, rem, half;
  int e;
  bit s;
  s = (v < 0);
  a = s ? -v : v;
  if (a == 0) return 16'h0000;
  e = 0;
  while ((longint'(1) << (e + 1)) <= a) e++;
  if (e <= 10) q = a << (10 - e);
  else begin
    q    = a >> (e - 10);
    rem  = a - (q << (e - 10));
    half = longint'(1) << (e - 11);
    if (rem > half || (rem == half && q[0])) q++;
    if (q == 2048) begin q = 1024; e++; end
  end
  if (e > 15) return {s, 5'h1F, 10'h000};
  return {s, 5'(e + 15), 10'(q)};
endfunction

function automatic logic [15:0] ref_sat16(longint v);
  if (v > 32767) return 16'h7FFF;
  if (v < -32768) return 16'h8000;
  return 16'(v);
endfunction
