// tb_gps_pkg -- reference C/A codes and a simple sky model for the testbenches.
//
// The reference codes are built differently from the RTL generator: G1 and
// G2 are run once as bit sequences and code p is G1(t) XOR G2(t - d_p), with
// d_p the standard G2 delay of PRN p+1 in chips. A satellite's chip at
// receiver chip time n is its code chip (n - offset) mod 1023, inverted while
// its navigation bit is 1; a navigation bit lasts EPB epochs (20 for real
// GPS signals). Several satellites are combined by a majority vote, a simple
// logical model of the superposed received signal.
package tb_gps_pkg;

  localparam int L = 1023;

  localparam int G2_DELAY [32] = '{
    5, 6, 7, 8, 17, 18, 139, 140, 141, 251, 252, 254, 255, 256, 257, 258,
    469, 470, 471, 472, 473, 474, 509, 512, 513, 514, 515, 516, 859, 860, 861, 862};

  bit ca [32][L];

  function automatic void init_codes();
    bit g1s [L];
    bit g2s [L];
    bit [10:1] r1, r2;
    r1 = '1;
    r2 = '1;
    for (int t = 0; t < L; t++) begin
      g1s[t] = r1[10];
      g2s[t] = r2[10];
      r1 = {r1[9:1], r1[3] ^ r1[10]};
      r2 = {r2[9:1], r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10]};
    end
    for (int p = 0; p < 32; p++)
      for (int t = 0; t < L; t++)
        ca[p][t] = g1s[t] ^ g2s[(t - G2_DELAY[p] + L) % L];
  endfunction

  // Navigation bit number k of the satellite with PRN index p.
  function automatic bit nav_bit(int p, longint k);
    return ((k + longint'(p)) % 3) == 0;
  endfunction

  // Epoch number of receiver chip n for a satellite with the given offset.
  function automatic longint sat_epoch(longint n, int offset);
    return (n - offset + 64'd1000 * L) / L - 1000;
  endfunction

  // Chip of satellite p (offset, EPB epochs per nav bit) at receiver chip n.
  function automatic bit sat_chip(int p, int offset, int epb, longint n);
    longint e;
    int     c;
    e = sat_epoch(n, offset);
    c = int'((n - offset + 64'd1000 * L) % L);
    return ca[p][c] ^ nav_bit(p, (e + 64'd1000 * epb) / epb - 1000);
  endfunction

  function automatic bit maj3(bit a, bit b, bit c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
