// sram_fault_pkg: fault descriptions for the behavioural SRAM model used by
// the testbenches (sram_fault_model).
package sram_fault_pkg;

  typedef enum logic [2:0] {
    F_NONE  = 3'd0,
    F_SA0   = 3'd1,  // cell (addr,bit) stuck at 0
    F_SA1   = 3'd2,  // cell (addr,bit) stuck at 1
    F_TF_UP = 3'd3,  // cell (addr,bit) cannot rise 0->1
    F_TF_DN = 3'd4,  // cell (addr,bit) cannot fall 1->0
    F_CFIN  = 3'd5,  // any transition of (addr2,bit2) inverts (addr,bit)
    F_AF    = 3'd6   // address decoder: accesses to addr reach word addr2
  } fault_kind_e;

  typedef struct packed {
    fault_kind_e kind;
    logic [7:0]  addr;
    logic [7:0]  bit_;
    logic [7:0]  addr2;
    logic [7:0]  bit2;
  } fault_t;

  localparam fault_t NO_FAULT = '{kind: F_NONE, addr: 8'd0, bit_: 8'd0, addr2: 8'd0, bit2: 8'd0};

endpackage
