// risp_pkg: constants and types shared by the reconfigurable unit (RU) of a
// RISP in-storage processing SSD.
//
// The RU sits between the NVM channels and the embedded CPU. Each channel has
// an NVM controller and a processing cell; one public processing cell serves
// all channels and writes results into the on-device DRAM (global memory).
// Numbers that come from the reference design (64 channels, 400 MB/s per
// channel, 100 MHz RU clock, 15 GB/s DRAM, alpha = 9/1/1 bytes per cycle and
// n_delay = 15/2/4 cycles for K-Means/Binarization/Sobel) are marked below;
// the rest (memory depths, cluster count, image width) are this design's own.
package risp_pkg;

  // ---- system sizes --------------------------------------------------------
  localparam int unsigned N_CH_DEF      = 64;   // channels (reference: 4-64, 64 in the reconfiguration study)
  localparam int unsigned F_RU_MHZ_DEF  = 100;  // RU clock, MHz (reference: 100-500, 100 in the reconfiguration study)
  localparam int unsigned B_CH_MBPS_DEF = 400;  // NVM channel read bandwidth, MB/s (reference)

  // One NVM word holds nine bytes: one K-Means point (alpha = 9) or nine
  // pixels' worth of bytes for the byte-stream kernels.
  localparam int unsigned WORD_BYTES    = 9;
  localparam int unsigned WORD_W        = 8 * WORD_BYTES;
  localparam int unsigned NVM_WORDS_DEF = 512;  // words emulated per channel (own choice)

  // Global-memory line: 128 bytes, the largest power of two not above the
  // 150 bytes per RU cycle that 15 GB/s gives at 100 MHz.
  localparam int unsigned LINE_BYTES    = 128;
  localparam int unsigned LINE_W        = 8 * LINE_BYTES;

  // ---- applications ----------------------------------------------------------
  typedef enum logic [1:0] {
    APP_KMEANS   = 2'd0,
    APP_BINARIZE = 2'd1,
    APP_SOBEL    = 2'd2
  } app_e;

  typedef enum logic {
    MODE_REGULAR = 1'b0,  // RU is a plain data path between DRAM and NVM
    MODE_ISP     = 1'b1   // RU processes data in storage
  } mode_e;

  // bytes fed into a processing cell per cycle (alpha, Table II)
  localparam int unsigned ALPHA_KMEANS   = 9;
  localparam int unsigned ALPHA_BINARIZE = 1;
  localparam int unsigned ALPHA_SOBEL    = 1;

  // input-to-output latency in cycles (n_delay, Table II)
  localparam int unsigned NDELAY_KMEANS   = 15;
  localparam int unsigned NDELAY_BINARIZE = 2;
  localparam int unsigned NDELAY_SOBEL    = 4;

  // K-Means shape (own choice: nine 8-bit features per point, four clusters)
  localparam int unsigned KM_DIM   = 9;
  localparam int unsigned KM_K     = 4;
  localparam int unsigned KM_SUM_W = 32;
  localparam int unsigned KM_NSUM  = KM_K * (KM_DIM + 1);  // per cluster: DIM sums + count

  // Sobel tile width limit (own choice)
  localparam int unsigned SOBEL_MAX_W = 64;

  function automatic int unsigned alpha_of(app_e a);
    return (a == APP_KMEANS) ? ALPHA_KMEANS : 1;
  endfunction

  function automatic int unsigned clog2_min1(int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
