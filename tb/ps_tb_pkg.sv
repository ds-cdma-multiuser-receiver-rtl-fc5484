// ps_tb_pkg -- reference models shared by the testbenches.
//
// Everything here is written from the definitions, independently of the RTL:
// the spreading sequence from its recurrence, the interleaver by evaluating its
// polynomial directly, and the PS-CDMA transmitter and channel that produce a
// frame of received chips for K users (repetition by M, user interleaver,
// spreading by N/M chips per partition, equal chip amplitude, sum of users
// plus approximately Gaussian noise, sign-magnitude H-bit chips).
package ps_tb_pkg;

  // n-th bit (n = 0, 1, ...) of the spreading sequence that starts from `seed`
  // (bit i of the seed is stage i+1) and obeys a[n+51] = a[n] ^ a[n+3].
  function automatic void lfsr_seq(input logic [50:0] seed, input int unsigned len,
                                   ref bit seq[]);
    seq = new[len + 51];
    for (int i = 0; i < 51; i++) seq[i] = seed[i];
    for (int n = 0; n < int'(len); n++) seq[n + 51] = seq[n] ^ seq[n + 3];
  endfunction

  // pi(x) = (63x + 128x^2 + h) mod depth, evaluated directly in 64 bits.
  function automatic int unsigned il_addr(int unsigned x, int unsigned h, int unsigned depth);
    longint unsigned v;
    v = 64'd63 * x + 64'd128 * x * x + h;
    return int'(v % depth);
  endfunction

  // Approximately Gaussian integer noise with standard deviation `sd`
  // (sum of 12 uniforms on [-0.5, 0.5)).
  function automatic int gauss(real sd);
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += (real'($urandom % 65536) / 65536.0) - 0.5;
    return $rtoi(s * sd + ((s >= 0.0) ? 0.5 : -0.5));
  endfunction

  // Transmit one frame: data[k][q] for K users and L symbols; returns rx[]
  // (L*N sign-magnitude H-bit chips). seeds[k] and offs[k] are the users'
  // spreading seeds and interleaver offsets.
  function automatic void transmit(input int unsigned K, N, M, L, H, amp, input real noise_sd,
                                   input logic [50:0] seeds[], input int unsigned offs[],
                                   input bit data[][], ref logic [15:0] rx[]);
    int unsigned LN, LM, CH;
    int          sum [];
    bit          seq [];
    LN = L * N; LM = L * M; CH = N / M;
    sum = new[LN];
    rx  = new[LN];
    foreach (sum[c]) sum[c] = 0;
    for (int unsigned k = 0; k < K; k++) begin
      lfsr_seq(seeds[k], LN, seq);
      for (int unsigned c = 0; c < LN; c++) begin
        int unsigned p, j, q;
        int v;
        p = c / CH;                      // partition slot in time
        j = il_addr(p, offs[k], LM);     // coded-bit index carried by slot p
        q = j / M;                       // symbol of that coded bit
        v = data[k][q] ? -int'(amp) : int'(amp);
        if (seq[c]) v = -v;
        sum[c] += v;
      end
    end
    for (int unsigned c = 0; c < LN; c++) begin
      int v, mx;
      v  = sum[c] + gauss(noise_sd);
      mx = (1 << (H - 1)) - 1;
      if (v > mx) v = mx;
      if (v < -mx) v = -mx;
      rx[c] = (v < 0) ? 16'((1 << (H - 1)) | (-v)) : 16'(v);
    end
  endfunction

endpackage
