// copa_pkg: constants and types shared by the cluster and its application cores.
//
// The cluster side follows the three-tier organisation of the machine: a
// controller FPGA masters a shared backplane bus (64-bit data, 16-bit address),
// one CPLD per plug-in module bridges that bus onto a local bus to its eight
// compute FPGAs. The 64/16 bus widths and the 16 x 8 population are the
// machine's; the split of the 16-bit address into module / FPGA / register
// fields, the read and write strobes and the register maps are this design's.
//
// The arithmetic side carries the NIST P-256 prime and the register map of the
// application cores.
package copa_pkg;

  // ---------------------------------------------------------------- cluster
  localparam int unsigned BUS_DATA_W  = 64;  // backplane data bus width
  localparam int unsigned BUS_ADDR_W  = 16;  // backplane address bus width
  localparam int unsigned LB_ADDR_W   = 9;   // register address inside one FPGA

  // backplane address = { module[15:12], fpga[11:9], reg[8:0] }
  localparam int unsigned ADDR_MOD_LSB  = 12;
  localparam int unsigned ADDR_FPGA_LSB = 9;

  // register address inside an FPGA = { core[8:6], word[5:0] }
  // core slot 7 of every FPGA address is answered by the module CPLD itself.
  localparam logic [2:0] CPLD_SLOT      = 3'd7;
  localparam logic [5:0] CPLD_REG_DONE  = 6'd0;  // done bitmap of the 8 FPGAs
  localparam logic [5:0] CPLD_REG_MON   = 6'd1;  // monitor status
  localparam logic [5:0] CPLD_REG_ID    = 6'd2;  // module number

  // per-core register words
  localparam logic [5:0] CORE_REG_CTRL  = 6'd32; // write: start/mode, read: status
  localparam logic [5:0] CORE_REG_OUT0  = 6'd40; // first result word

  // one access on the backplane, driven by the controller
  typedef struct packed {
    logic                  rd;
    logic                  wr;
    logic [BUS_ADDR_W-1:0] addr;
    logic [BUS_DATA_W-1:0] wdata;
  } bp_req_t;

  // one access on a module's local bus, driven by the CPLD
  typedef struct packed {
    logic                  rd;
    logic                  wr;
    logic [2:0]            fpga;
    logic [LB_ADDR_W-1:0]  addr;
    logic [BUS_DATA_W-1:0] wdata;
  } lb_req_t;

  // read data returned towards the controller (modules that are not addressed
  // return zeros so the returns can be OR-ed onto the shared bus)
  typedef struct packed {
    logic                  rvalid;
    logic [BUS_DATA_W-1:0] rdata;
  } bus_rsp_t;

  // application loaded into a compute FPGA
  typedef enum logic [0:0] { APP_ECDSA = 1'b0, APP_ECM = 1'b1 } app_e;

  // ---------------------------------------------------------------- P-256
  localparam logic [255:0] P256 =
    256'hFFFFFFFF_00000001_00000000_00000000_00000000_FFFFFFFF_FFFFFFFF_FFFFFFFF;

  // field operations of the point-arithmetic sequencers
  typedef enum logic [1:0] { FOP_ADD, FOP_SUB, FOP_MUL } fop_e;

endpackage
