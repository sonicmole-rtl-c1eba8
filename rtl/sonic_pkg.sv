// sonic_pkg -- types and constants shared by the mole debug module and the
// PIPE memory port multiplexer.
//
// The mole is an embedded logic analyzer for one PIPE of the UltraSONIC
// reconfigurable computer. Its 13 host-visible registers sit on the PIPE bus
// at 64-bit (8-byte) strides, 0x000 to 0x060; the register widths below are
// the published ones. The bit assignments inside the 4-bit control registers
// (operation commands, trigger edge, finish flags) and the encoding of the
// controller state are this design's own choices.
//
// Memory words are 32 bits (one capture-port sample) and memory addresses
// 21 bits, matching the StoreAddress and MemSize register widths.
package sonic_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_PORTS    = 4;   // probe ports P1..P4
  localparam int unsigned CH_W       = 32;  // channels per probe port
  localparam int unsigned MEM_ADDR_W = 21;  // PIPE memory word address
  localparam int unsigned MEM_DATA_W = 32;  // PIPE memory word
  localparam int unsigned PB_ADDR_W  = 12;  // mole register window on the PIPE bus
  localparam int unsigned PB_DATA_W  = 64;  // PIPE bus data

  typedef logic [CH_W-1:0]       ch_t;
  typedef logic [MEM_ADDR_W-1:0] maddr_t;
  typedef logic [MEM_DATA_W-1:0] mdata_t;

  // ------------------------------------------------ register map (byte addr)
  localparam logic [PB_ADDR_W-1:0] A_MODE        = 12'h000;
  localparam logic [PB_ADDR_W-1:0] A_EDGE_TRIG   = 12'h008;
  localparam logic [PB_ADDR_W-1:0] A_OPERATION   = 12'h010;
  localparam logic [PB_ADDR_W-1:0] A_TRIG_VAL_A  = 12'h018;
  localparam logic [PB_ADDR_W-1:0] A_TRIG_VAL_B  = 12'h020;
  localparam logic [PB_ADDR_W-1:0] A_STORE_ADDR  = 12'h028;
  localparam logic [PB_ADDR_W-1:0] A_STORE_VAL_A = 12'h030;
  localparam logic [PB_ADDR_W-1:0] A_STORE_VAL_B = 12'h038;
  localparam logic [PB_ADDR_W-1:0] A_MEM_SIZE    = 12'h040;
  localparam logic [PB_ADDR_W-1:0] A_ROUND_NO    = 12'h048;
  localparam logic [PB_ADDR_W-1:0] A_SEL_OUT_CH  = 12'h050;
  localparam logic [PB_ADDR_W-1:0] A_SEL_TRG_CH  = 12'h058;
  localparam logic [PB_ADDR_W-1:0] A_FINISH      = 12'h060;

  // ------------------------------------------- bits of the 4-bit registers
  // Operation_REG: one command bit each; the host writes the whole register.
  localparam int unsigned OP_START  = 0;
  localparam int unsigned OP_STOP   = 1;
  localparam int unsigned OP_PAUSE  = 2;
  localparam int unsigned OP_RESUME = 3;
  // EdgeTrig_REG: neither bit set = trigger while the pattern matches.
  localparam int unsigned EDGE_POS = 0;   // pattern starts to match
  localparam int unsigned EDGE_NEG = 1;   // pattern stops matching
  // Finish_REG flags, set by the controller in its Finish state.
  localparam int unsigned FIN_DONE    = 0;
  localparam int unsigned FIN_FULL    = 1;
  localparam int unsigned FIN_STOPPED = 2;
  // Mode_REG bit 0: 0 = embedded mode, 1 = standalone mode.
  localparam int unsigned MODE_STANDALONE = 0;

  // -------------------------------------------------- controller states
  typedef enum logic [2:0] {
    ST_INI    = 3'd0,
    ST_CLEAR  = 3'd1,
    ST_TRIG   = 3'd2,
    ST_STORE  = 3'd3,
    ST_PAUSE  = 3'd4,
    ST_FINISH = 3'd5
  } mole_state_e;

  // ------------------------------------- register contents, as one bundle
  typedef struct packed {
    logic [3:0]  mode;
    logic [3:0]  edge_trig;
    logic [3:0]  operation;
    ch_t         trig_val_a;   // trigger pattern
    ch_t         trig_val_b;   // trigger care mask (1 = compare this bit)
    maddr_t      store_addr;   // first word of the store area
    ch_t         store_val_a;  // store qualifier pattern
    ch_t         store_val_b;  // store qualifier care mask
    maddr_t      mem_size;     // words in the store area
    logic [3:0]  round_no;     // passes over the store area (0 counts as 1)
    logic [3:0]  sel_out_ch;   // capture port, 0..3 = P1..P4 (bits 1:0)
    logic [3:0]  sel_trg_ch;   // trigger port, 0..3 = P1..P4 (bits 1:0)
    logic [3:0]  finish;
  } mole_cfg_t;

  // ------------------------------------ one PIPE memory port request
  typedef struct packed {
    logic   we;     // 1 = write, 0 = read
    logic   bank;   // PM bank 1 (0) or bank 2 (1)
    maddr_t addr;
    mdata_t wdata;
  } pm_req_t;

endpackage
