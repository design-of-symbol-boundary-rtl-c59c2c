// Shared types and constants for the DVB-T/H inner-receiver front end:
// transmission-mode and guard-interval encodings, the request bundle used on
// every port of the fourteen-SRAM memory bank, and constellation encodings.
// Mode and GI encodings follow the TPS field order of EN 300 744; the bank
// request struct is this design's own interface choice.
package dvb_pkg;

  // Transmission mode (FFT size). DVB-H adds 4K to DVB-T's 2K and 8K.
  typedef enum logic [1:0] {MODE_2K = 2'd0, MODE_8K = 2'd1, MODE_4K = 2'd2} tx_mode_e;

  // Guard interval as a fraction of the useful symbol length.
  typedef enum logic [1:0] {GI_1_32 = 2'd0, GI_1_16 = 2'd1, GI_1_8 = 2'd2, GI_1_4 = 2'd3} gi_e;

  // Constellation (drives how many demapper stages are enabled).
  typedef enum logic [1:0] {CONST_QPSK = 2'd0, CONST_16QAM = 2'd1, CONST_64QAM = 2'd2} const_e;

  // Memory bank geometry: fourteen single-port 1K x 12 SRAM modules.
  localparam int unsigned NBANK   = 14;
  localparam int unsigned BANK_AW = 10;
  localparam int unsigned BANK_W  = 12;

  // One single-port access request to one SRAM module.
  typedef struct packed {
    logic                en;
    logic                we;
    logic [BANK_AW-1:0]  addr;
    logic [BANK_W-1:0]   wdata;
  } bank_req_t;

  localparam bank_req_t BANK_IDLE = '{en: 1'b0, we: 1'b0, addr: '0, wdata: '0};

  // log2 of the useful symbol length N for a mode.
  function automatic int unsigned mode_log2n(tx_mode_e m);
    case (m)
      MODE_2K: return 11;
      MODE_4K: return 12;
      default: return 13;
    endcase
  endfunction

  // Index of the last active carrier, Kmax = 1704 / 3408 / 6816.
  function automatic logic [12:0] mode_kmax(tx_mode_e m);
    case (m)
      MODE_2K: return 13'd1704;
      MODE_4K: return 13'd3408;
      default: return 13'd6816;
    endcase
  endfunction

endpackage
