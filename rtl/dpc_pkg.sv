// Shared constants and types of the dynamic partitioned cache.
//
// The cache geometry defaults follow the evaluated configuration: a 16 KB
// cache split into eight ways, shared by one critical and one non-critical
// 32-bit core. The 32-byte line and the 32-bit address are this design's own
// choices. The reconfiguration opcodes are the four calls that wrap a
// critical task: release ways of the non-critical core, give free ways to the
// critical core, release ways of the critical core, give free ways back to
// the non-critical core.
package dpc_pkg;

  localparam int unsigned DPC_ADDR_W      = 32;     // byte address width
  localparam int unsigned DPC_DATA_W      = 32;     // core word width
  localparam int unsigned DPC_CACHE_BYTES = 16384;  // total cache capacity
  localparam int unsigned DPC_NUM_WAYS    = 8;      // configurable ways (s)
  localparam int unsigned DPC_LINE_BYTES  = 32;     // bytes per cache line
  localparam int unsigned DPC_NUM_CORES   = 2;      // cores sharing one cache
  localparam int unsigned DPC_NC_CORE     = 0;      // index of the non-critical core

  // Reconfiguration request of a critical core to the ways management unit.
  typedef enum logic [1:0] {
    OP_FREE_NC  = 2'd0,  // non-critical core returns ways to the free pool
    OP_ALLOC_C  = 2'd1,  // requesting critical core takes ways from the pool
    OP_FREE_C   = 2'd2,  // requesting critical core returns ways to the pool
    OP_ALLOC_NC = 2'd3   // non-critical core takes ways from the pool
  } cfg_op_e;

endpackage
