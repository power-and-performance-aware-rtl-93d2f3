// recac_pkg: constants shared by the ReCaC L2 cache blocks.
//
// The defaults describe the main configuration: a 2-core CMP sharing a
// 2 MB, 16-way L2 with 128-byte lines (1024 sets) in a 64-bit physical
// address space, so an address splits into 47 tag bits, 10 index bits and
// 7 offset bits. PAT_W (called K in the text) is the number of low index bits
// the index remapping logic compares; 6 bits give 1024/64 = 16 monitoring sets
// per core, 32 in total, the count found best for every core count.
// The OS register map and the timing constants are this design's own choice,
// except the 12-cycle L2 access (11 cycles of array plus 1 cycle of remapping),
// the 1-cycle drowsy wake-up and the 750,000-cycle partitioning interval,
// which follow the text.
package recac_pkg;
  parameter int unsigned N_CORES    = 2;
  parameter int unsigned WAYS       = 16;
  parameter int unsigned SETS       = 1024;
  parameter int unsigned LINE_BYTES = 128;
  parameter int unsigned ADDR_W     = 64;
  parameter int unsigned PAT_W      = 6;      // K
  parameter int unsigned OFF_W      = $clog2(LINE_BYTES);
  parameter int unsigned IDX_W      = $clog2(SETS);
  parameter int unsigned TAG_W      = ADDR_W - IDX_W - OFF_W;   // 47
  parameter int unsigned LINE_W     = 8 * LINE_BYTES;           // 1024
  parameter int unsigned HIT_LAT    = 12;     // L2 access with eATD, cycles
  parameter int unsigned WAKE_LAT   = 1;      // drowsy-to-normal wake-up, cycles
  parameter int unsigned INTERVAL   = 750000; // partitioning interval, cycles
  parameter int unsigned CNT_W      = 20;     // profiling counter width
  parameter int unsigned APD_W      = 8;      // APD register, units of 0.1 %
  parameter int unsigned E_MEM      = 150;    // memory access energy / L2 access energy
  parameter int unsigned E_WAY      = 20000;  // energy saved per drowsy way per interval,
                                              // in L2 access energies (assumed)

  // OS register map (word addresses of the configuration port)
  parameter logic [7:0] REG_MASK   = 8'h00;  // K-bit mask register
  parameter logic [7:0] REG_CUR    = 8'h10;  // + j : current pattern of monitoring set j
  parameter logic [7:0] REG_NEW    = 8'h20;  // + j*N_CORES + t : {R, new pattern} of set j, thread t
  parameter logic [7:0] REG_APD    = 8'h40;  // + t : APD register of core t
  parameter logic [7:0] REG_CTRL   = 8'h60;  // bit 0: flush the L2 (self clearing)

  typedef enum logic [1:0] {
    SET_NORMAL = 2'd0,
    SET_MON    = 2'd1,
    SET_RMP    = 2'd2
  } set_kind_e;

endpackage
