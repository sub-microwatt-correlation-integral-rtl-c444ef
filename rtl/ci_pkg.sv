// ci_pkg -- constants and types shared by the correlation integral (CI)
// processor.
//
// The processor estimates the chaoticity of 16 EEG/ECoG channels. Each
// channel is sampled at 256 Hz with 9-bit precision; the 16 channels arrive
// time-multiplexed, one sample per clock, so the system clock is 4096 Hz.
// Phase-space vectors have p = 7 components spaced tau samples apart; one
// vector is formed every SIGMA = 24 samples and the CI of a channel is taken
// over its last N = 10 vectors (45 vector pairs).
//
// tau is "about 14 ms" at 256 Hz, i.e. 3.6 samples; 4 samples is used here,
// which also makes SIGMA = (p-1)*tau, so that the last component of one
// vector is the first component of the next and the vectors tile the signal.
// The choice of signed samples, the Euclidean norm and the widths of the
// threshold and CI words are this design's own.
package ci_pkg;

  // Channels folded onto the shared hardware (M in the system description).
  localparam int unsigned NCH      = 16;
  // Bits per EEG/ECoG sample, two's complement.
  localparam int unsigned SAMPLE_W = 9;
  // Embedding dimension p.
  localparam int unsigned P        = 7;
  // Delay between vector components, in samples of one channel.
  localparam int unsigned TAU      = 4;
  // Vector sampling period sigma, in samples of one channel.
  localparam int unsigned SIGMA    = 24;
  // Vectors per CI window N (window time W = 1 s).
  localparam int unsigned NVEC     = 10;
  // Width of the distance threshold epsilon (covers sqrt(7)*511).
  localparam int unsigned EPS_W    = 11;

  localparam int unsigned VEC_W    = P * SAMPLE_W;                 // 63 bits per vector

endpackage
