// pdn_pkg: constants and types shared by the multi-tenant PDN attack test bed.
//
// The test bed places three tenants on one FPGA: an attacker that switches on
// an array of power wasters, victims (an RSA core with CRT and a ripple-carry
// adder under a delay-fault tester) and a monitor network of ring-oscillator
// voltage sensors. The numbers below are the defaults of the Cyclone V set-up,
// which is the main configuration: 46 sensors, 19-stage rings, 20-bit
// counters, 10 us sampling periods, 12,000 wasters, a 64-stage carry chain and
// a 128-bit RSA datapath. The 50 MHz system clock and the host-bus layout are
// this design's own choices.
package pdn_pkg;

  // System clock of the monitor and the victims (own choice: 50 MHz board clock).
  localparam int unsigned SYS_CLK_HZ      = 50_000_000;

  // Monitor network.
  localparam int unsigned RO_STAGES       = 19;      // inverting stages per sensor ring
  localparam int unsigned RO_CNT_W        = 20;      // frequency counter width
  localparam int unsigned NUM_SENSORS_C5  = 46;      // Cyclone V network
  localparam int unsigned NUM_SENSORS_A10 = 132;     // Arria 10 network
  localparam int unsigned SAMPLE_PERIOD_NS = 10_000; // measurement period
  localparam int unsigned MON_MAX_SAMPLES = 100;     // samples per logged run

  // Attacker.
  localparam int unsigned NUM_WASTERS_C5  = 12_000;
  localparam int unsigned NUM_WASTERS_A10 = 28_160;

  // Victims.
  localparam int unsigned ADDER_WIDTH     = 64;      // carry-chain stages
  localparam int unsigned RSA_KEY_BITS    = 128;     // modular-exponentiation width

  // Host bus shared by all host-visible blocks: 32-bit words, 20-bit word
  // addresses split into a 4-bit region and a 16-bit index.
  localparam int unsigned HB_ADDR_W = 20;
  localparam int unsigned HB_DATA_W = 32;

  typedef logic [HB_ADDR_W-1:0] hb_addr_t;
  typedef logic [HB_DATA_W-1:0] hb_data_t;

  // Address of word `index` in region `region`.
  function automatic hb_addr_t hb_addr(input logic [3:0] region, input int unsigned index);
    return {region, 16'(index)};
  endfunction

  // RSA core register map (regions of rsa_host_mem).
  typedef enum logic [3:0] {
    RSA_REG_CTRL = 4'd0,  // write bit0 = start; read {cycles[30:0], done} at index 0, cycles at 1
    RSA_REG_P    = 4'd1,
    RSA_REG_Q    = 4'd2,
    RSA_REG_D    = 4'd3,
    RSA_REG_X    = 4'd4,
    RSA_REG_YP   = 4'd5,
    RSA_REG_YQ   = 4'd6
  } rsa_region_e;

  // Delay-fault tester register map.
  typedef enum logic [3:0] {
    DFT_REG_CTRL = 4'd0,  // write bit0 = run, bit1 = clear log; read status words
    DFT_REG_VEC  = 4'd1,  // vector table: vec*16 + {a:0.., b:4.., expected:8..}
    DFT_REG_LOG  = 4'd2   // fault log: entry*8 + {timestamp, vector, sum words}
  } dft_region_e;

  // Sensor controller register map.
  typedef enum logic [3:0] {
    MON_REG_CTRL = 4'd0,  // write index0 = number of samples (starts a run); read status
    MON_REG_LOG  = 4'd1   // log memory, word sample*NUM_SENSORS + sensor
  } mon_region_e;

endpackage
