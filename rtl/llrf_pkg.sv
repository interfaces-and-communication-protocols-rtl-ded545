// llrf_pkg -- shared constants and types of the ATCA LLRF controller FPGAs.
//
// Timing constants follow the system: an 81 MHz sampling/processing clock
// distributed on the Zone 3 backplane, an RF pulse window of 1024 us opened by
// a trigger of at most 10 Hz, and 32 cavities shared by four carrier blades.
// The Integral Interface (II) bus is carried as two packed structs, a request
// (master to slave) and a response (slave to master); all its control lines
// are active low, as on the original bus. The Low Latency Link (LLL) word type
// models the 32-bit user interface of a multi-gigabit transceiver with one
// "is K character" flag per byte. The TLP codes are the standard PCI Express
// values for 32-bit memory read, memory write and completion with data.
package llrf_pkg;

  // ---- system timing ------------------------------------------------------
  localparam int unsigned CLK_MHZ      = 81;                // sampling clock, MHz
  localparam int unsigned PULSE_US     = 1024;              // RF pulse window, us
  localparam int unsigned PULSE_CYCLES = CLK_MHZ * PULSE_US; // 82944 samples

  // ---- system size --------------------------------------------------------
  localparam int unsigned N_BOARDS     = 4;   // ATCA carrier blades
  localparam int unsigned N_CAVITIES   = 32;  // cavities of one RF station
  localparam int unsigned CH_PER_BOARD = N_CAVITIES / N_BOARDS;
  localparam int unsigned SAMPLE_W     = 16;  // I or Q sample width
  localparam int unsigned SUM_W        = 24;  // partial/total vector sum width
  localparam int unsigned DAC_W        = 16;  // vector modulator DAC code width

  // ---- Integral Interface bus --------------------------------------------
  typedef struct packed {
    logic        strobe_n;   // transaction request, active low
    logic        write_n;    // 0 = write, 1 = read
    logic [31:0] addr;       // word address
    logic [31:0] data;       // write data
    logic        irq_ack_n;  // interrupt acknowledge, active low
  } ii_req_t;

  typedef struct packed {
    logic        ack_n;      // transaction acknowledge, active low
    logic [31:0] data;       // read data, valid while ack_n is low
    logic        irq_n;      // interrupt request, active low
  } ii_rsp_t;

  localparam ii_req_t II_REQ_IDLE = '{strobe_n: 1'b1, write_n: 1'b1, addr: '0,
                                      data: '0, irq_ack_n: 1'b1};

  // ---- Low Latency Link ---------------------------------------------------
  typedef struct packed {
    logic [31:0] data;
    logic [3:0]  charisk;    // per byte: 1 = control (K) character
  } lll_word_t;

  localparam logic [7:0] K28_5 = 8'hBC;  // idle / comma
  localparam logic [7:0] K27_7 = 8'hFB;  // start of frame
  localparam logic [7:0] D16_2 = 8'h50;  // idle filler data byte
  localparam int unsigned LLL_FRAME_WORDS = 4;
  localparam lll_word_t LLL_IDLE = '{data: {K28_5, D16_2, D16_2, D16_2}, charisk: 4'b1000};

  // ---- PCI Express transaction layer -------------------------------------
  localparam logic [7:0] TLP_MRD32 = 8'h00;  // fmt 000, type 00000
  localparam logic [7:0] TLP_MWR32 = 8'h40;  // fmt 010, type 00000
  localparam logic [7:0] TLP_CPLD  = 8'h4A;  // fmt 010, type 01010

endpackage
