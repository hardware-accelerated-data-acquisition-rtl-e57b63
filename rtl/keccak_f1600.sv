// keccak_f1600: the Keccak-f[1600] permutation, iterated one round per clock.
//
// A pulse on `start` loads `state_in` and the unit then applies the 24 rounds
// (theta, rho, pi, chi, iota) one per cycle. `done` pulses in the cycle after
// the last round, with the result on `state_out`, which holds until the next
// start; `busy` is high from the cycle after `start` until `done`.
// Latency: the clock edge that samples `start` loads the state, the next 24
// edges apply the rounds and the 24th of them raises `done`, so a
// permutation occupies 25 cycles including the load.
//
// Lane (x,y) is bits [64*(x+5*y) +: 64] of the state, byte 0 of the state is
// bits [7:0], as in the Keccak reference. The document only names Keccak as
// the MAC primitive; the round-per-cycle structure is this design's choice.
module keccak_f1600 (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [1599:0] state_in,
  output logic [1599:0] state_out,
  output logic          busy,
  output logic          done
);

  localparam int unsigned NROUNDS = 24;

  localparam logic [63:0] RC [NROUNDS] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A,
    64'h8000000080008000, 64'h000000000000808B, 64'h0000000080000001,
    64'h8000000080008081, 64'h8000000000008009, 64'h000000000000008A,
    64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089,
    64'h8000000000008003, 64'h8000000000008002, 64'h8000000000000080,
    64'h000000000000800A, 64'h800000008000000A, 64'h8000000080008081,
    64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008
  };

  // rotation offsets r[x][y], indexed x + 5*y
  localparam int unsigned ROT [25] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14
  };

  logic [1599:0] st_q, st_next;
  logic [4:0]    round_q;

  function automatic logic [63:0] rotl(input logic [63:0] v, input int unsigned n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  always_comb begin
    logic [63:0] a [25];
    logic [63:0] b [25];
    logic [63:0] c [5];
    logic [63:0] d [5];
    for (int i = 0; i < 25; i++) a[i] = st_q[64*i +: 64];
    // theta
    for (int x = 0; x < 5; x++)
      c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i%5];
    // rho and pi: B[y][2x+3y] = rot(A[x][y], r[x][y])
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y], ROT[x + 5*y]);
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    // iota
    a[0] = a[0] ^ RC[round_q];
    for (int i = 0; i < 25; i++) st_next[64*i +: 64] = a[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= '0;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        st_q    <= state_in;
        round_q <= '0;
        busy    <= 1'b1;
      end else if (busy) begin
        st_q <= st_next;
        if (round_q == 5'(NROUNDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round_q <= round_q + 5'd1;
        end
      end
    end
  end

  assign state_out = st_q;

endmodule
