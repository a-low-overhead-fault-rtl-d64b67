// sea_pkg: shared pieces of the SEA (Scalable Encryption Algorithm) cipher.
// The 3-bit substitution box S = [0, 5, 6, 7, 4, 3, 1, 2] is the one of the
// design description. It is applied bit-sliced: bit j of the three words
// x(3i), x(3i+1), x(3i+2) forms one 3-bit input, x(3i) being its least
// significant bit (this bit order is this design's choice).
package sea_pkg;
  function automatic logic [2:0] sea_sbox3(input logic [2:0] v);
    unique case (v)
      3'd0: return 3'd0;
      3'd1: return 3'd5;
      3'd2: return 3'd6;
      3'd3: return 3'd7;
      3'd4: return 3'd4;
      3'd5: return 3'd3;
      3'd6: return 3'd1;
      default: return 3'd2;
    endcase
  endfunction
endpackage
