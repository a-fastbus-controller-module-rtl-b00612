// sfc_pkg: types and constants shared by the FASTBUS controller (SFC).
//
// The controller is an IEEE 796 (MULTIBUS) I/O slave occupying 256 bytes of
// I/O space. The low 8 address bits select either a register or a FASTBUS
// command. The command encoding follows the address map implied by the
// 68000 example code that drives the module (base+$E0 address cycle,
// base+$F0 data cycle, base+$40 "take AS down", base+7 control register,
// base+4 master status register); the exact bit assignment below is this
// design's reading of those offsets:
//
//   adr[7:6]  00 register space, 01 COMMAND mode, 10 OVERLAPPED mode,
//             11 interlocked CYCLE mode
//   adr[5]    AS level requested
//   adr[4]    DS (perform a data cycle)
//   adr[3:2]  MS1, MS0
//   adr[1:0]  byte offset inside the 32-bit AD longword
package sfc_pkg;

  typedef enum logic [1:0] {
    SP_REG     = 2'b00,
    SP_COMMAND = 2'b01,
    SP_OVERLAP = 2'b10,
    SP_CYCLE   = 2'b11
  } space_e;

  // One MULTIBUS transfer as seen by the core, after byte-lane steering:
  // even byte of the 16-bit half-word in [7:0], odd byte in [15:8].
  typedef struct packed {
    logic        write;
    logic [7:1]  hadr;    // half-word address inside the 256-byte window
    logic [1:0]  be;      // byte enables: be[0] even byte, be[1] odd byte
    logic [15:0] wdata;
  } mb_req_t;

  // A FASTBUS primitive requested of the master sequencer.
  typedef struct packed {
    logic       as;       // requested AS level
    logic       ds;       // perform a data cycle
    logic [1:0] ms;       // MS1, MS0
    logic       rd;       // read (RD line) for data cycles
    logic       eg;       // enable geographic addressing on address cycles
  } fb_cmd_t;

  // Error classes, laid out for a mask-and-shift indexed branch.
  typedef enum logic [1:0] {
    ERR_NONE    = 2'd0,
    ERR_SS      = 2'd1,
    ERR_PARITY  = 2'd2,
    ERR_TIMEOUT = 2'd3
  } err_e;

  typedef struct packed {
    err_e       cls;
    logic [2:0] ss;
  } fb_err_t;

  // Broadcast cases, carried in AD[1:0] of a broadcast address cycle.
  typedef enum logic [1:0] {
    BC_GENERAL = 2'd0,
    BC_PATTERN = 2'd1,
    BC_SPARSE  = 2'd2,
    BC_SRSCAN  = 2'd3
  } bcast_e;

  // Register offsets (register space, adr[7:6] = 00).
  localparam logic [5:0] R_AD0     = 6'h00;  // AD register, bytes 0..3
  localparam logic [5:0] R_MSTAT   = 6'h04;  // master status
  localparam logic [5:0] R_ERR     = 6'h05;  // error status (write clears)
  localparam logic [5:0] R_INT     = 6'h06;  // interrupt status
  localparam logic [5:0] R_CTL     = 6'h07;  // control
  localparam logic [5:0] R_ARBLVL  = 6'h08;  // arbitration level CSR
  localparam logic [5:0] R_SCFG    = 6'h09;  // IA width code, sparse-data flag
  localparam logic [5:0] R_SSTAT   = 6'h0A;  // slave status
  localparam logic [5:0] R_SDK     = 6'h0B;  // slave pseudo-DK command (SS in [2:0])
  localparam logic [5:0] R_LA0     = 6'h0C;  // logical address CSR, bytes 0..3
  localparam logic [5:0] R_SDIN0   = 6'h10;  // slave data in, bytes 0..3
  localparam logic [5:0] R_SDOUT0  = 6'h14;  // slave data out, bytes 0..3

  // Control register bits.
  localparam int C_ARREQ  = 7;  // request mastership (GK held while set)
  localparam int C_GINTEN = 6;  // enable GINTR sources
  localparam int C_SCRAM  = 5;  // drop GK and AS on any error
  localparam int C_AUTOSL = 4;  // automatic slave
  localparam int C_HOST   = 3;  // assert GK without arbitration (host preempt)
  localparam int C_RB     = 2;  // drive RB
  localparam int C_EG     = 1;  // EG on master address cycles
  localparam int C_SR     = 0;  // drive SR

  // Byte lane of the 32-bit AD word addressed by longword byte offset b.
  // LSB-first order puts bytes 0,1 in AD[15:0]; MSB-first puts them in AD[31:16].
  function automatic logic [1:0] ad_lane(input logic [1:0] b, input logic msb_first);
    return {b[1] ^ msb_first, b[0]};
  endfunction

  // Internal-address width for IA code 0..5 (8, 13, 18, 23, 28, 32 bits).
  function automatic int unsigned ia_bits(input logic [2:0] code);
    case (code)
      3'd0: return 8;
      3'd1: return 13;
      3'd2: return 18;
      3'd3: return 23;
      3'd4: return 28;
      default: return 32;
    endcase
  endfunction

endpackage
